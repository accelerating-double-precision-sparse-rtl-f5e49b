// tb_psum_storage: self-checking testbench of the ping-pong partial-sum storage.
//
// Keeps a reference copy of both halves. In each round the accumulator port
// does random one-word writes and reads on one half (reads are checked 3
// cycles later against the value before any write in the same cycle), while
// the other half, filled in the previous round, is streamed out row by row
// (checked 2 cycles later) and cleared one row behind the read. Later rounds
// read the cleared half back and so check that it became zero.
module tb_psum_storage;
  import spmv_pkg::*;

  logic       clk = 0;
  logic       acc_rd_en, acc_rd_buf, acc_wr_en, acc_wr_buf;
  logic [6:0] acc_rd_row, acc_wr_row;
  dword_t     acc_rd_data, acc_wr_data;
  logic       so_en, so_buf, clr_en;
  logic [4:0] so_addr, clr_addr;
  logic [1:0] clr_mask;
  dword_t     so_data [WORDS];
  int checks = 0, failures = 0;

  psum_storage dut (.*);

  always #5 clk = ~clk;

  dword_t model [2][BLOCK];
  dword_t rd_exp [$];
  logic   rd_vld [$];
  typedef logic [WORDS-1:0][63:0] row_t;
  row_t   so_exp [$];
  logic   so_vld [$];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // one round: accumulator on half a, stream-out and clear of the other half
  task automatic round(input logic a, input bit stream);
    for (int c = 0; c < 200; c++) begin
      row_t row_exp;
      @(negedge clk);
      acc_rd_en  = $urandom_range(0, 1);
      acc_rd_buf = a;
      acc_rd_row = 7'($urandom_range(0, BLOCK - 1));
      acc_wr_en  = $urandom_range(0, 1);
      acc_wr_buf = a;
      acc_wr_row = 7'($urandom_range(0, BLOCK - 1));
      acc_wr_data = {$urandom(), $urandom()};
      so_en    = stream && c < BUF_DEPTH;
      so_buf   = !a;
      so_addr  = 5'(c);
      clr_en   = stream && c >= 1 && c <= BUF_DEPTH;
      clr_mask = a ? 2'b01 : 2'b10;
      clr_addr = 5'(c - 1);
      rd_vld.push_back(acc_rd_en);
      rd_exp.push_back(model[a][acc_rd_row]);
      for (int w = 0; w < WORDS; w++) row_exp[w] = model[!a][so_addr*WORDS + w];
      so_vld.push_back(so_en);
      so_exp.push_back(row_exp);
      @(posedge clk);
      if (acc_wr_en) model[a][acc_wr_row] = acc_wr_data;
      if (clr_en) for (int w = 0; w < WORDS; w++) model[!a][clr_addr*WORDS + w] = '0;
    end
  endtask

  // compare outputs with the expectations queued 3 and 2 cycles earlier
  always @(negedge clk) begin
    if (rd_vld.size() > PSUM_RD_LAT) begin
      dword_t e;
      logic v;
      v = rd_vld.pop_front(); e = rd_exp.pop_front();
      if (v) check(acc_rd_data == e, $sformatf("acc read %h expected %h", acc_rd_data, e));
    end
    if (so_vld.size() > 2) begin
      row_t e;
      logic v;
      v = so_vld.pop_front(); e = so_exp.pop_front();
      if (v) for (int w = 0; w < WORDS; w++)
        check(so_data[w] == e[w], $sformatf("stream word %0d %h expected %h", w, so_data[w], e[w]));
    end
  end

  initial begin
    acc_rd_en = 0; acc_wr_en = 0; so_en = 0; clr_en = 0;
    acc_rd_buf = 0; acc_wr_buf = 0; acc_rd_row = 0; acc_wr_row = 0; acc_wr_data = 0;
    so_buf = 0; so_addr = 0; clr_mask = 0; clr_addr = 0;
    // clear both halves
    for (int r = 0; r < BUF_DEPTH; r++) begin
      @(negedge clk);
      clr_en = 1; clr_mask = 2'b11; clr_addr = 5'(r);
    end
    @(negedge clk); clr_en = 0;
    foreach (model[b, i]) model[b][i] = '0;
    round(0, 0);
    round(1, 1);
    round(0, 1);
    round(1, 1);
    round(0, 1);
    @(negedge clk); acc_rd_en = 0; acc_wr_en = 0; so_en = 0; clr_en = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_psum_if: self-checking testbench of the partial-sum interface. A model
// element raises blk_rdy at random times and, two cycles after go, emits 32
// rows of 4 random doubles. The testbench checks that go is given only while
// the memory is free and no block is on its way, that a full memory raises
// the request, reads all 256 words through the bus port (row r, double w at
// words 8r+2w and 8r+2w+1, low half first) against the rows sent, and then
// reports the memory drained so the next block may go.
module tb_psum_if;
  import spmv_pkg::*;
  logic        clk = 0, rst, drain_done, req, blk_rdy, go, pvalid, plast;
  logic [7:0]  bus_addr;
  logic [31:0] bus_rdata;
  dword_t      pdata [WORDS];
  int checks = 0, failures = 0, n_held = 0;
  dword_t      rows [32][WORDS];

  psum_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    rst = 1; drain_done = 0; blk_rdy = 0; pvalid = 0; plast = 0; bus_addr = 0;
    foreach (pdata[w]) pdata[w] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 5; b++) begin
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #1 blk_rdy = 1;
      #1 check(go, "go while the memory is free");
      @(posedge clk); #1;
      blk_rdy = 1;                      // element asks again before its rows arrive
      #1 check(!go, "no go while a block is on its way");
      blk_rdy = 0;
      @(posedge clk); #1;
      for (int r = 0; r < 32; r++) begin
        pvalid = 1; plast = (r == 31);
        for (int w = 0; w < WORDS; w++) begin
          rows[r][w] = {$urandom, $urandom};
          pdata[w] = rows[r][w];
        end
        @(posedge clk); #1;
      end
      pvalid = 0; plast = 0;
      check(req, "request when the block is complete");
      blk_rdy = 1;
      for (int i = 0; i < 3; i++) begin
        #1 check(!go, "no go while the memory is full");
        if (!go) n_held++;
        @(posedge clk); #1;
      end
      blk_rdy = 0;
      for (int a = 0; a < 256; a++) begin
        bus_addr = 8'(a);
        @(posedge clk); #1;
        check(bus_rdata == rows[a / 8][(a % 8) / 2][32 * (a % 2) +: 32],
              $sformatf("block %0d word %0d", b, a));
      end
      drain_done = 1;
      @(posedge clk); #1;
      drain_done = 0;
      check(!req, "no request after the drain");
    end
    check(n_held > 0, "go held back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

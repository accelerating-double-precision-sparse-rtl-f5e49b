// tb_vector_cache: self-checking testbench of the ping-pong vector storage.
//
// Loads vector blocks through the xvalid/xdata_ack/xeod interface with random
// gaps, and checks: astop while the head entry's half is empty, acceptance of
// a second block while the first is in use, back-pressure (xdata_ack low) when
// both halves are full, release of a half when the head entry switches to the
// other buffer bit, the data of random reads against the loaded blocks, and the
// 2-cycle read latency.
module tb_vector_cache;
  import spmv_pkg::*;

  logic   clk = 0, rst;
  logic   xvalid, xdata_ack, xeod;
  dword_t xin [WORDS];
  logic   head_valid, head_vbuf, astop, vector_blk_rdy;
  logic   rd_en, rd_vbuf;
  logic [6:0] rd_col;
  dword_t rd_data;
  int checks = 0, failures = 0;
  int n_astop = 0, n_backpressure = 0;

  vector_cache dut (.*);

  always #5 clk = ~clk;

  dword_t blk [4][BLOCK];   // reference blocks

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // send one block; returns when its last beat has been accepted
  task automatic send_block(input int b);
    int beat = 0;
    while (beat < BUF_DEPTH) begin
      @(negedge clk);
      xvalid = ($urandom_range(0, 3) != 0);
      for (int w = 0; w < WORDS; w++) xin[w] = blk[b][beat*WORDS + w];
      xeod = (beat == BUF_DEPTH - 1);
      @(posedge clk);
      if (xvalid && xdata_ack) beat++;
      if (xvalid && !xdata_ack) n_backpressure++;
    end
    @(negedge clk);
    xvalid = 0; xeod = 0;
  endtask

  // read every element of block b from half vb, in random order, and compare
  task automatic read_block(input int b, input logic vb);
    dword_t exp_q [$];
    int pending = 0;
    for (int i = 0; i < BLOCK + VEC_RD_LAT; i++) begin
      @(negedge clk);
      if (i >= VEC_RD_LAT) begin
        dword_t e;
        e = exp_q.pop_front();
        check(rd_data == e, $sformatf("read data %h expected %h", rd_data, e));
      end
      if (i < BLOCK) begin
        int c;
        c = $urandom_range(0, BLOCK - 1);
        rd_en = 1; rd_vbuf = vb; rd_col = 7'(c);
        exp_q.push_back(blk[b][c]);
      end else rd_en = 0;
    end
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < BLOCK; i++) blk[b][i] = {$urandom(), $urandom()};
    rst = 1; xvalid = 0; xeod = 0; head_valid = 0; head_vbuf = 0; rd_en = 0;
    rd_vbuf = 0; rd_col = 0;
    foreach (xin[w]) xin[w] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // head entry for block 0 waits for its vector block
    head_valid = 1; head_vbuf = 0;
    #1 check(astop == 1, "astop with no block loaded"); n_astop += astop;
    check(vector_blk_rdy == 0, "vector_blk_rdy before load");
    send_block(0);
    #1 check(astop == 0, "astop after block 0 loaded");
    check(vector_blk_rdy == 1, "vector_blk_rdy after load");
    fork
      send_block(1);
      read_block(0, 0);
    join
    // both halves full: further data is refused
    @(negedge clk);
    check(xdata_ack == 0, "xdata_ack low with both halves full");
    // block 2 is offered while both halves are full: it is held back until
    // a head entry of the next block releases half 0
    fork
      send_block(2);
      begin
        repeat (10) @(negedge clk);
        head_vbuf = 1;
        #1 check(astop == 0, "no astop, next block already loaded");
      end
    join
    read_block(1, 1);
    // block 3 must wait: block 2 sits in half 0, block 1 still in use
    head_vbuf = 0;
    @(negedge clk);
    fork
      send_block(3);
      begin
        // the head for block 2 releases half 1, block 3 then fills it
        read_block(2, 0);
      end
    join
    head_vbuf = 1;
    #1 check(astop == 0, "block 3 loaded after release");
    // head for block 3 while block 2's half is... block 3 is in half 1
    @(negedge clk);
    read_block(3, 1);
    // a head entry for a block that has not been fetched: astop
    head_vbuf = 0;
    #1 check(astop == 1, "astop for a block not yet fetched"); n_astop += astop;
    check(n_backpressure > 0, "back-pressure seen");
    $display("astop=%0d backpressure=%0d", n_astop, n_backpressure);
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

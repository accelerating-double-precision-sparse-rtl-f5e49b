// tb_spmv_pe: end-to-end self-checking testbench of one processing element.
//
// Builds a 6-rowstrip by 3-column-block matrix (768 x 384) whose dense blocks
// leave rowstrip 0 (leading gap) and rowstrip 3 (inner gap) empty, give
// rowstrip 2 so few entries that rowstrip 4 must wait for its half, and contain heavy rows, schedules it for one element
// with the 16-entry row separation, and drives the matrix stream and the
// vector block stream with random gaps. The element's output must be the whole
// result vector, block by block, equal to the exact reference. The testbench
// counts the cycles of each stall or insertion mechanism (astop, clkout_busy,
// queue credit exhausted, start-up wait, null entries, zero blocks, vector
// back-pressure) and counts a failure for any that never happened. It also
// checks that with no stalls an entry is accepted every cycle.
module tb_spmv_pe;
  import spmv_pkg::*;
  import spmv_tb_pkg::*;

  localparam int NRS = 6, NCB = 3;

  logic       clk = 0, rst;
  logic [ROWSTRIP_WIDTH:0] n_rowstrips;
  logic       avalid, aack, xvalid, xdata_ack, xeod;
  mat_entry_t adata;
  dword_t     xin [WORDS];
  logic       blk_rdy, go, pvalid, plast, done;
  dword_t     pdata [WORDS];
  int checks = 0, failures = 0;
  int n_astop = 0, n_clkout = 0, n_credit = 0, n_init = 0, n_zero_rows = 0,
      n_xbp = 0, max_run = 0, run = 0;

  spmv_pe dut (.*);
  assign go = blk_rdy;

  always #5 clk = ~clk;

  spmv_tb_pkg::spmv_problem prob;
  longint got [$];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // matrix stream
  initial begin
    int idx = 0;
    avalid = 0; adata = '0;
    wait (prob != null && !rst);
    while (idx < prob.seq[0].size()) begin
      @(negedge clk);
      // gaps only in the first half of the run
      avalid = (idx > prob.seq[0].size() / 2) || ($urandom_range(0, 7) != 0);
      adata  = prob.seq[0][idx];
      @(posedge clk);
      if (aack) idx++;
    end
    @(negedge clk); avalid = 0;
  end

  // vector block stream
  initial begin
    xvalid = 0; xeod = 0;
    foreach (xin[w]) xin[w] = '0;
    wait (prob != null && !rst);
    for (int b = 0; b < prob.blk_rs.size(); b++) begin
      int beat;
      beat = 0;
      while (beat < BUF_DEPTH) begin
        @(negedge clk);
        xvalid = ($urandom_range(0, 3) != 0);
        for (int w = 0; w < WORDS; w++) xin[w] = prob.xword(b, beat, w);
        xeod = (beat == BUF_DEPTH - 1);
        @(posedge clk);
        if (xvalid && xdata_ack) beat++;
        if (xvalid && !xdata_ack) n_xbp++;
      end
    end
    @(negedge clk); xvalid = 0; xeod = 0;
  end

  // mechanism counters and output capture
  always @(posedge clk) if (!rst) begin
    if (avalid && dut.astop) n_astop++;
    if (!dut.q_empty && dut.clkout_busy && !dut.init_busy) n_clkout++;
    if (avalid && !dut.astop && !dut.fp_busy && !dut.eom_taken && !aack) n_credit++;
    if (dut.fp_busy) n_init++;
    if (pvalid) begin
      for (int w = 0; w < WORDS; w++) got.push_back(longint'($bitstoreal(pdata[w])));
      if (pdata[0] == 0 && pdata[1] == 0 && pdata[2] == 0 && pdata[3] == 0) n_zero_rows++;
    end
    run = aack ? run + 1 : 0;
    if (run > max_run) max_run = run;
  end

  initial begin
    prob = new(NRS, NCB);
    prob.add_block(1, 0, 150, 20);
    prob.add_block(1, 2, 60, 0);
    prob.add_block(2, 1, 12, 0);
    prob.add_block(4, 0, 40, 5);
    prob.add_block(4, 1, 300, 0);
    prob.add_block(5, 2, 200, 30);
    prob.schedule(1, PSUM_RD_LAT + ADD_LAT + 1);
    n_rowstrips = (ROWSTRIP_WIDTH+1)'(NRS);
    rst = 1;
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 0;
    while (!done) @(posedge clk);
    repeat (5) @(posedge clk);
    check(got.size() == NRS * BLOCK, $sformatf("%0d result elements, expected %0d", got.size(), NRS * BLOCK));
    for (int i = 0; i < NRS * BLOCK && i < got.size(); i++)
      check(got[i] == prob.yref[i], $sformatf("y[%0d] = %0d expected %0d", i, got[i], prob.yref[i]));
    check(n_astop > 0,  "astop never happened");
    check(n_clkout > 0, "clkout_busy never happened");
    check(n_credit > 0, "queue credit never ran out");
    check(n_init >= INIT_COUNT, "start-up wait");
    check(prob.n_null > 0, "no null entries scheduled");
    check(n_zero_rows >= 2 * BUF_DEPTH, "zero blocks");
    check(max_run >= 20, "no run of back-to-back accepted entries");
    $display("entries=%0d nulls=%0d astop=%0d clkout_busy=%0d credit=%0d init=%0d zero_rows=%0d xbackpressure=%0d max_run=%0d",
             prob.n_entries, prob.n_null, n_astop, n_clkout, n_credit, n_init, n_zero_rows, n_xbp, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

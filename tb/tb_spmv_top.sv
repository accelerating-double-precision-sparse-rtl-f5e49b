// tb_spmv_top: end-to-end self-checking testbench of the complete multiplier
// with five processing elements, at the design's default parameters.
//
// Builds a 1024 x 1024 matrix (8 rowstrips, 8 column blocks) with dense blocks
// of varying density and heavy rows, leaving rowstrip 0 (leading), rowstrip 4
// (inner) and rowstrip 7 (trailing) empty and giving rowstrip 3 only a handful
// of entries. The schedule spreads each block over the five elements with the
// 16-entry row separation. Matrix streams and the broadcast vector stream are
// driven with random gaps, like DRAM bursts with refresh and turnaround.
// Checks: the complete result vector, in order, against the exact reference;
// ylast on every 32nd row; the processing rate (entries per element per cycle
// while the streams are steady). Mechanisms counted, each required at least
// once: astop (vector block late), clkout_busy (partial-sum half not yet
// emptied), queue credit exhausted, start-up wait, null entries, zero blocks,
// vector back-pressure, and elements waiting for each other at a block (go).
// The embedded single-element peripheral beside the multiplier gets a short
// smoke test here (start it, see its vector and matrix requests raise the
// interrupt, acknowledge one and see it masked); its full data flow has its
// own testbench.
module tb_spmv_top;
  import spmv_pkg::*;
  import spmv_tb_pkg::*;

  localparam int N_PE = 5;
  localparam int NRS = 8, NCB = 8;

  logic         clk = 0, rst;
  logic [ROWSTRIP_WIDTH:0] n_rowstrips;
  logic         avalid [N_PE];
  logic [127:0] adata  [N_PE];
  logic         aack   [N_PE];
  logic         xvalid, xdata_ack, xeod;
  dword_t       xin [WORDS];
  logic         yvalid, ylast, done;
  dword_t       yout [WORDS];
  int checks = 0, failures = 0;
  int n_astop = 0, n_clkout = 0, n_credit = 0, n_init = 0, n_zero_blk = 0,
      n_xbp = 0, n_gowait = 0, n_acc = 0, cyc = 0, t_first = 0, t_last = 0;

  logic [1:0]   emb_bus_space;
  logic [7:0]   emb_bus_addr;
  logic         emb_bus_we;
  logic [31:0]  emb_bus_wdata, emb_bus_rdata;
  logic         emb_irq;
  int           n_emb_irq = 0;

  spmv_top dut (.*);

  // embedded peripheral: start, expect vector and matrix requests, acknowledge the vector one
  initial begin
    emb_bus_space = 0; emb_bus_addr = 0; emb_bus_we = 0; emb_bus_wdata = 0;
    wait (prob != null && !rst);
    repeat (10) @(posedge clk);
    check(!emb_irq, "embedded peripheral quiet before start");
    @(negedge clk);
    emb_bus_addr = 8'd1; emb_bus_wdata = (32'd1 << 16) | (32'd1 << 8); emb_bus_we = 1;
    @(negedge clk);
    emb_bus_we = 0; emb_bus_addr = 8'd0;
    repeat (3) @(posedge clk);
    #1 if (emb_irq) n_emb_irq++;
    check(emb_bus_rdata[2:0] == 3'b011, "embedded status: vector and matrix requests");
    @(negedge clk);
    emb_bus_addr = 8'd1; emb_bus_wdata = (32'd1 << 16) | (32'd1 << 8) | 32'd1; emb_bus_we = 1;
    @(negedge clk);
    emb_bus_we = 0; emb_bus_addr = 8'd0;
    repeat (3) @(posedge clk);
    #1 check(emb_bus_rdata[2:0] == 3'b010, "embedded status: vector interrupt masked after acknowledge");
  end

  always #5 clk = ~clk;

  spmv_tb_pkg::spmv_problem prob;
  longint got [$];
  bit     zero_blk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // matrix streams, one per element
  for (genvar p = 0; p < N_PE; p++) begin : g_drv
    initial begin
      int idx;
      idx = 0;
      avalid[p] = 0; adata[p] = '0;
      wait (prob != null && !rst);
      while (idx < prob.seq[p].size()) begin
        @(negedge clk);
        avalid[p] = ($urandom_range(0, 15) != 0);
        adata[p]  = {32'd0, prob.seq[p][idx]};
        @(posedge clk);
        if (aack[p]) idx++;
      end
      @(negedge clk); avalid[p] = 0;
    end
  end

  // broadcast vector stream
  initial begin
    xvalid = 0; xeod = 0;
    foreach (xin[w]) xin[w] = '0;
    wait (prob != null && !rst);
    for (int b = 0; b < prob.blk_rs.size(); b++) begin
      int beat;
      beat = 0;
      while (beat < BUF_DEPTH) begin
        @(negedge clk);
        xvalid = ($urandom_range(0, 5) != 0);
        for (int w = 0; w < WORDS; w++) xin[w] = prob.xword(b, beat, w);
        xeod = (beat == BUF_DEPTH - 1);
        @(posedge clk);
        if (xvalid && xdata_ack) beat++;
        if (xvalid && !xdata_ack) n_xbp++;
      end
    end
    @(negedge clk); xvalid = 0; xeod = 0;
  end

  // mechanism counters and result capture
  always @(posedge clk) if (!rst) begin
    bit any_rdy, all_rdy;
    cyc++;
    any_rdy = 0; all_rdy = 1;
    for (int p = 0; p < N_PE; p++) begin
      any_rdy |= dut.blk_rdy[p];
      all_rdy &= dut.blk_rdy[p];
    end
    if (any_rdy && !all_rdy) n_gowait++;
    if (avalid[0] && dut.g_pe[0].u_pe.astop) n_astop++;
    if (!dut.g_pe[0].u_pe.q_empty && dut.g_pe[0].u_pe.clkout_busy && !dut.g_pe[0].u_pe.init_busy) n_clkout++;
    if (avalid[0] && !dut.g_pe[0].u_pe.astop && !dut.g_pe[0].u_pe.fp_busy &&
        !dut.g_pe[0].u_pe.eom_taken && !aack[0]) n_credit++;
    if (dut.g_pe[0].u_pe.fp_busy) n_init++;
    for (int p = 0; p < N_PE; p++) if (aack[p]) begin
      n_acc++;
      if (t_first == 0) t_first = cyc;
      t_last = cyc;
    end
    if (yvalid) begin
      if (got.size() % BLOCK == 0) zero_blk = 1;
      for (int w = 0; w < WORDS; w++) begin
        got.push_back(longint'($bitstoreal(yout[w])));
        if (yout[w] != 0) zero_blk = 0;
      end
      check(ylast == ((got.size() % BLOCK) == 0), "ylast");
      if (got.size() % BLOCK == 0 && zero_blk) n_zero_blk++;
    end
  end

  initial begin
    real rate;
    prob = new(NRS, NCB);
    prob.add_block(1, 0, 900, 40);
    prob.add_block(1, 3, 400, 0);
    prob.add_block(2, 2, 1200, 60);
    prob.add_block(2, 5, 300, 10);
    prob.add_block(2, 7, 160, 0);
    prob.add_block(3, 1, 9, 0);
    prob.add_block(5, 4, 1500, 0);
    prob.add_block(5, 6, 700, 50);
    prob.add_block(6, 0, 200, 0);
    prob.add_block(6, 6, 1000, 20);
    prob.schedule(N_PE, PSUM_RD_LAT + ADD_LAT + 1);
    n_rowstrips = (ROWSTRIP_WIDTH+1)'(NRS);
    rst = 1;
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 0;
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
    check(got.size() == NRS * BLOCK, $sformatf("%0d result elements, expected %0d", got.size(), NRS * BLOCK));
    for (int i = 0; i < NRS * BLOCK && i < got.size(); i++)
      check(got[i] == prob.yref[i], $sformatf("y[%0d] = %0d expected %0d", i, got[i], prob.yref[i]));
    rate = real'(n_acc) / real'(N_PE * (t_last - t_first + 1));
    check(rate > 0.5, $sformatf("entry rate %f per element per cycle", rate));
    check(n_astop > 0,   "astop never happened");
    check(n_clkout > 0,  "clkout_busy never happened");
    check(n_credit > 0,  "queue credit never ran out");
    check(n_init >= INIT_COUNT, "start-up wait");
    check(prob.n_null > 0, "no null entries scheduled");
    check(n_zero_blk >= 3, "zero blocks");
    check(n_xbp > 0,     "vector back-pressure never happened");
    check(n_gowait > 0,  "elements never waited for each other");
    check(n_emb_irq > 0, "embedded peripheral never interrupted");
    $display("entries=%0d nulls=%0d cycles=%0d rate=%f astop=%0d clkout_busy=%0d credit=%0d init=%0d zero_blocks=%0d xbackpressure=%0d gowait=%0d",
             prob.n_entries, prob.n_null, cyc, rate, n_astop, n_clkout, n_credit, n_init, n_zero_blk, n_xbp, n_gowait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

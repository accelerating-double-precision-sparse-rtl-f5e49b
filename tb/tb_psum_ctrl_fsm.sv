// tb_psum_ctrl_fsm: self-checking testbench of the partial-sum transfer control.
//
// Feeds a stream of accumulator entries whose rowstrip indices start late,
// step by one, jump over several rowstrips and end before the last rowstrip,
// taking an entry whenever clkout_busy allows, and answers blk_rdy with go
// after a random delay. The emitted blocks are compared with the expected list
// (zero block or data block from the right half), each block must be 32 rows
// with addresses 0..31 and the rows cleared behind it, and the number of
// blocks must equal n_rowstrips. It also counts the cycles an entry was held
// back by clkout_busy and requires some.
module tb_psum_ctrl_fsm;
  import spmv_pkg::*;

  logic      clk = 0, rst;
  logic [ROWSTRIP_WIDTH:0] n_rowstrips;
  logic      head_valid, pop, clkout_busy, init_busy, blk_rdy, go;
  psum_tag_t head_tag;
  logic      so_en, so_buf, clr_en, out_en, out_zero, out_last, done;
  logic [4:0] so_addr, clr_addr;
  logic [1:0] clr_mask;
  int checks = 0, failures = 0, n_busy = 0;

  psum_ctrl_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // entry stream: rowstrip index of each entry, pbuf toggles per rowstrip
  int rs_list [$] = '{2, 2, 2, 2, 3, 3, 3, 6, 6, 6, 6, 6, 7};
  // expected blocks: -1 zero block, 0/1 data from that half
  int exp_blk [$] = '{-1, -1, 0, 1, -1, -1, 0, 1, -1, -1};

  // observe the output blocks
  int row_in_blk = 0, blk_no = 0, clr_rows = 0;
  always @(posedge clk) if (!rst) begin
    if (out_en) begin
      if (row_in_blk == 0) begin
        int e;
        e = (blk_no < exp_blk.size()) ? exp_blk[blk_no] : 99;
        check(out_zero == (e == -1), $sformatf("block %0d kind", blk_no));
        if (!out_zero) check(int'(so_buf) == e, $sformatf("block %0d half", blk_no));
      end
      if (!out_zero) check(so_en && so_addr == 5'(row_in_blk), "stream address");
      check(out_last == (row_in_blk == BUF_DEPTH - 1), "out_last");
      row_in_blk++;
      if (row_in_blk == BUF_DEPTH) begin row_in_blk = 0; blk_no++; end
    end
    if (clr_en && clr_mask != 2'b11) begin
      check(clr_mask == (so_buf ? 2'b10 : 2'b01), "clear mask");
      check(clr_addr == 5'(clr_rows % BUF_DEPTH), "clear address");
      clr_rows++;
    end
    if (head_valid && clkout_busy && !init_busy) n_busy++;
  end

  // go after a random delay
  always @(posedge clk) go <= blk_rdy && ($urandom_range(0, 3) == 0) && !go;

  initial begin
    int idx = 0;
    int pb;
    rst = 1; head_valid = 0; pop = 0; head_tag = '0;
    n_rowstrips = (ROWSTRIP_WIDTH+1)'(exp_blk.size());
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    pb = 0;
    while (idx < rs_list.size()) begin
      head_valid = 1;
      pb = 0;
      for (int k = 1; k <= idx; k++) if (rs_list[k] != rs_list[k-1]) pb = 1 - pb;
      head_tag.rowstrip = rs_rowstrip(rs_list[idx]);
      head_tag.pbuf     = 1'(pb);
      head_tag.eom      = (idx == rs_list.size() - 1);
      head_tag.row      = 7'($urandom_range(0, 127));
      head_tag.is_null  = 0;
      #1 pop = head_valid && !clkout_busy;
      @(posedge clk);
      if (pop) idx++;
      @(negedge clk);
      pop = 0;
      head_valid = ($urandom_range(0, 2) != 0);
    end
    head_valid = 0;
    while (!done) @(negedge clk);
    check(blk_no == exp_blk.size(), $sformatf("%0d blocks emitted, expected %0d", blk_no, exp_blk.size()));
    check(clr_rows == BUF_DEPTH * 4, "all streamed rows cleared");
    check(n_busy > 0, "clkout_busy held an entry back");
    $display("blocks=%0d clkout_busy_cycles=%0d", blk_no, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rs_idx_t rs_rowstrip(input int r);
    return rs_idx_t'(r);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

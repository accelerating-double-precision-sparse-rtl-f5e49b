// tb_vec_if: self-checking testbench of the vector interface. Fills the
// 256-word memory space with random words through the bus port, reports the
// fill, and takes the 32 beats with a random acknowledge. Each beat must hold
// the four doubles assembled from the words (low half at the lower address),
// xeod must mark exactly the 32nd beat, and the interface must request the
// next fill afterwards. The first block is taken with acknowledge always high
// and must stream one beat per cycle (33 cycles from the fill, one for the
// first memory read).
module tb_vec_if;
  import spmv_pkg::*;
  logic        clk = 0, rst, enable, bus_we, fill_done, req, xvalid, xdata_ack, xeod;
  logic [7:0]  bus_addr;
  logic [31:0] bus_wdata;
  dword_t      xin [WORDS];
  int checks = 0, failures = 0;
  logic [31:0] words [256];

  vec_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    int beat, cyc;
    rst = 1; enable = 0; bus_we = 0; fill_done = 0; xdata_ack = 0; bus_addr = 0; bus_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);
    #1 check(!req, "no request before enable");
    enable = 1;
    for (int blk = 0; blk < 6; blk++) begin
      #1 check(req, "request while empty");
      for (int a = 0; a < 256; a++) begin
        words[a] = $urandom;
        bus_we = 1; bus_addr = 8'(a); bus_wdata = words[a];
        @(posedge clk); #1;
      end
      bus_we = 0;
      fill_done = 1;
      @(posedge clk); #1;
      fill_done = 0;
      check(!req, "no request while full");
      beat = 0; cyc = 0;
      while (beat < 32) begin
        xdata_ack = (blk == 0) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
        #1;
        if (xvalid && xdata_ack) begin
          for (int w = 0; w < WORDS; w++)
            check(xin[w] == {words[8 * beat + 2 * w + 1], words[8 * beat + 2 * w]},
                  $sformatf("block %0d beat %0d word %0d", blk, beat, w));
          check(xeod == (beat == 31), "xeod on the last beat only");
          beat++;
        end
        @(posedge clk); #1;
        cyc++;
        if (cyc > 400) break;
      end
      xdata_ack = 0;
      if (blk == 0) check(cyc == 33, $sformatf("32 beats in %0d cycles, expected 33", cyc));
      check(beat == 32, "32 beats per block");
      #1 check(!xvalid, "no beat after the block");
    end
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

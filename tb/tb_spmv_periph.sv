// tb_spmv_periph: end-to-end testbench of the bus-attached processing element.
//
// The testbench plays the processor and the DMA engine. It builds a
// 384 x 256 blocked matrix (rowstrip 1 empty, a heavy row in one block),
// schedules it for one element, and then runs the interrupt-driven software
// loop: on each interrupt it reads the status register and, per requesting
// interface, clears done, sets acknowledge, moves the data word by word
// (256 vector words, up to 255 matrix words, 256 result words), clears
// acknowledge and sets done. Result blocks are compared with the exact
// reference. It counts vector fills, matrix fills (at least one full and one
// partial), result blocks (including a zero block), interrupts, and the
// element's done flag, and checks that the interrupt stays low while a
// transfer is being acknowledged.
module tb_spmv_periph;
  import spmv_pkg::*;
  import spmv_tb_pkg::*;

  localparam int NRS = 3, NCB = 2;

  logic        clk = 0, rst;
  logic [1:0]  bus_space;
  logic [7:0]  bus_addr;
  logic        bus_we;
  logic [31:0] bus_wdata, bus_rdata;
  logic        irq;
  int checks = 0, failures = 0;
  int n_vfill = 0, n_mfill = 0, n_pblk = 0, n_irq = 0, n_partial = 0;
  logic [31:0] sw = 0;

  spmv_periph dut (.*);

  always #5 clk = ~clk;

  spmv_tb_pkg::spmv_problem prob;
  logic [31:0] mwords [$];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // bus accesses: driven at the falling edge, taken at the rising edge
  task automatic bus_write(input logic [1:0] s, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_space = s; bus_addr = a; bus_wdata = d; bus_we = 1'b1;
    @(posedge clk);
    #1 bus_we = 1'b0;
  endtask

  task automatic bus_read(input logic [1:0] s, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_space = s; bus_addr = a; bus_we = 1'b0;
    @(posedge clk);
    #1 d = bus_rdata;
  endtask

  task automatic set_sw(input int bitn, input bit v);
    sw[bitn] = v;
    bus_write(2'd0, 8'd1, sw);
  endtask

  // acknowledge, transfer, done, for interface i (0 vector, 1 matrix, 2 result)
  task automatic begin_xfer(input int i);
    set_sw(2 * i + 1, 1'b0);
    set_sw(2 * i, 1'b1);
    repeat (2) @(posedge clk);
    check(!irq || (i != 2 && dut.pirq) || (i != 1 && dut.mirq) || (i != 0 && dut.virq),
          "interrupt masked after acknowledge");
  endtask

  task automatic end_xfer(input int i);
    set_sw(2 * i, 1'b0);
    set_sw(2 * i + 1, 1'b1);
  endtask

  initial begin
    logic [31:0] st, lo, hi;
    int vb, mw, rs;
    dword_t got;
    prob = new(NRS, NCB);
    prob.add_block(0, 0, 60, 0);
    prob.add_block(0, 1, 40, 12);
    prob.add_block(2, 1, 30, 0);
    prob.schedule(1, ADD_LAT + PSUM_RD_LAT + 1);
    for (int i = 0; i < prob.seq[0].size(); i++) begin
      logic [95:0] e;
      e = prob.seq[0][i];
      mwords.push_back(e[31:0]);
      mwords.push_back(e[63:32]);
      mwords.push_back(e[95:64]);
    end
    vb = 0; mw = 0; rs = 0;
    bus_space = 0; bus_addr = 0; bus_we = 0; bus_wdata = 0;
    rst = 1;
    repeat (4) @(posedge clk);
    rst <= 0;
    sw = 32'(NRS) << 16;
    bus_write(2'd0, 8'd1, sw);
    repeat (50) @(posedge clk);
    set_sw(8, 1'b1);                         // data initialised
    while (rs < NRS) begin
      while (!irq) @(posedge clk);
      n_irq++;
      bus_read(2'd0, 8'd0, st);
      if (st[0] && vb < prob.blk_cb.size()) begin
        begin_xfer(0);
        for (int j = 0; j < 32; j++)
          for (int w = 0; w < WORDS; w++) begin
            dword_t d;
            d = prob.xword(vb, j, w);
            bus_write(2'd1, 8'(8 * j + 2 * w), d[31:0]);
            bus_write(2'd1, 8'(8 * j + 2 * w + 1), d[63:32]);
          end
        end_xfer(0);
        vb++; n_vfill++;
      end
      if (st[1] && mw < mwords.size()) begin
        int n;
        begin_xfer(1);
        n = 0;
        while (n < 255 && mw < mwords.size()) begin
          bus_write(2'd2, 8'(n), mwords[mw]);
          n++; mw++;
        end
        if (n < 255) n_partial++;
        end_xfer(1);
        n_mfill++;
      end
      if (st[2]) begin
        begin_xfer(2);
        for (int r = 0; r < BLOCK; r++) begin
          bus_read(2'd3, 8'(2 * r), lo);
          bus_read(2'd3, 8'(2 * r + 1), hi);
          got = {hi, lo};
          check(got == $realtobits(real'(prob.yref[rs * BLOCK + r])),
                $sformatf("y[%0d] = %f, expected %0d", rs * BLOCK + r,
                          $bitstoreal(got), prob.yref[rs * BLOCK + r]));
        end
        end_xfer(2);
        rs++; n_pblk++;
      end
      if (!st[2] && !(st[0] && vb < prob.blk_cb.size()) && !(st[1] && mw < mwords.size()))
        repeat (20) @(posedge clk);          // only requests nobody serves: keep polling
    end
    repeat (20) @(posedge clk);
    bus_read(2'd0, 8'd0, st);
    check(st[3] == 1'b1, "element done after the last result block");
    bus_read(2'd0, 8'd2, st);
    check(st[7:0] == 8'(vb), "debug: vector fills");
    check(st[15:8] == 8'(n_mfill), "debug: matrix fills");
    check(st[23:16] == 8'(NRS), "debug: result blocks");
    $display("vector fills=%0d matrix fills=%0d (partial %0d) result blocks=%0d interrupts=%0d entries=%0d nulls=%0d",
             n_vfill, n_mfill, n_partial, n_pblk, n_irq, prob.seq[0].size(), prob.n_null);
    check(n_vfill == prob.blk_cb.size(), "every vector block transferred");
    check(n_mfill >= 2 && n_partial == 1, "full and partial matrix fills");
    check(n_pblk == NRS, "every result block transferred");
    check(mw == mwords.size(), "every matrix word transferred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

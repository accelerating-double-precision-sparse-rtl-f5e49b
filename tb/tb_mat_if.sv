// tb_mat_if: self-checking testbench of the matrix interface. Fills the
// memory space with 85 random 96-bit entries (three words each, lowest word
// first), reports the fill and takes the entries with a random acknowledge;
// every entry must arrive intact and in order, and after 85 the interface must
// request the next fill. A last fill carries an end-of-matrix flag on its
// 10th entry: the interface must stop there and request nothing more.
module tb_mat_if;
  import spmv_pkg::*;
  logic        clk = 0, rst, enable, bus_we, fill_done, req, avalid, aack;
  logic [7:0]  bus_addr;
  logic [31:0] bus_wdata;
  mat_entry_t  adata;
  int checks = 0, failures = 0;
  logic [95:0] ents [85];

  mat_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    int n, cyc, last;
    rst = 1; enable = 0; bus_we = 0; fill_done = 0; aack = 0; bus_addr = 0; bus_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);
    #1 check(!req, "no request before enable");
    enable = 1;
    for (int f = 0; f < 4; f++) begin
      last = (f == 3) ? 9 : 84;
      #1 check(req, "request while empty");
      for (int i = 0; i < 85; i++) begin
        mat_entry_t e;
        e = mat_entry_t'({$urandom, $urandom, $urandom});
        e.eom = (i == last) && (f == 3);
        ents[i] = e;
      end
      for (int a = 0; a < 255; a++) begin
        bus_we = 1; bus_addr = 8'(a); bus_wdata = ents[a / 3][32 * (a % 3) +: 32];
        @(posedge clk); #1;
      end
      bus_we = 0;
      fill_done = 1;
      @(posedge clk); #1;
      fill_done = 0;
      n = 0; cyc = 0;
      while (n <= last && cyc < 2000) begin
        aack = 1'($urandom_range(0, 1));
        #1;
        if (avalid && aack) begin
          check(adata == ents[n], $sformatf("fill %0d entry %0d", f, n));
          n++;
        end
        @(posedge clk); #1;
        cyc++;
      end
      aack = 0;
      check(n == last + 1, "all entries of the fill");
      repeat (10) @(posedge clk);
      #1 check(!avalid, "nothing after the fill");
      check(req == (f != 3), (f != 3) ? "request after a full fill" : "no request after end of matrix");
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

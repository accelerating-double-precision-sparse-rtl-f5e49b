// tb_reduction_tree: self-checking testbench of the partial-sum adder tree.
//
// Drives rows of 5 x 4 random doubles with random gaps, and compares every
// output lane bit for bit with the sum formed by the simulator in the tree's
// order ((p0 + p1) + (p2 + p3)) + p4. Also checks the valid/last flags and the
// latency of 3 levels x 12 cycles.
module tb_reduction_tree;
  import spmv_pkg::*;
  localparam int N = 5;
  localparam int LEVELS = 3;

  logic   clk = 0, rst;
  logic   in_valid, in_last, out_valid, out_last;
  dword_t in_data [N][WORDS];
  dword_t out_data [WORDS];
  int checks = 0, failures = 0;

  reduction_tree #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  typedef logic [WORDS-1:0][63:0] row_t;
  row_t exp_q [$];
  logic last_q [$];
  int   t_q [$];
  int   cyc = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic dword_t rnd();
    return $realtobits(real'(int'($urandom_range(0, 2000000)) - 1000000) / 1024.0);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      row_t e;
      int t0;
      logic l;
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        e = exp_q.pop_front(); l = last_q.pop_front(); t0 = t_q.pop_front();
        for (int w = 0; w < WORDS; w++)
          check(out_data[w] == e[w], $sformatf("lane %0d %h expected %h", w, out_data[w], e[w]));
        check(out_last == l, "last flag");
        check(cyc - t0 == LEVELS * ADD_LAT, $sformatf("latency %0d", cyc - t0));
      end
    end
  end

  initial begin
    rst = 1; in_valid = 0; in_last = 0;
    foreach (in_data[i, w]) in_data[i][w] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      row_t e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_last  = ($urandom_range(0, 7) == 0);
      foreach (in_data[p, w]) in_data[p][w] = rnd();
      for (int w = 0; w < WORDS; w++) begin
        real s01, s23, s;
        s01 = $bitstoreal(in_data[0][w]) + $bitstoreal(in_data[1][w]);
        s23 = $bitstoreal(in_data[2][w]) + $bitstoreal(in_data[3][w]);
        s   = (s01 + s23) + $bitstoreal(in_data[4][w]);
        e[w] = $realtobits(s);
      end
      if (in_valid) begin
        exp_q.push_back(e); last_q.push_back(in_last); t_q.push_back(cyc + 1);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LEVELS * ADD_LAT + 3) @(negedge clk);
    check(exp_q.size() == 0, "all rows came out");
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

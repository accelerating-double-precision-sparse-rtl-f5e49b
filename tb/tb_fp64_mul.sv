// tb_fp64_mul: self-checking testbench of the double-precision multiplier.
//
// Streams random operand pairs (normal numbers whose results stay in the
// normal range, plus signed zeros, infinities, NaN and cancellations) through
// the unit, one per cycle with random bubbles, and compares each result bit for
// bit with the simulator's own IEEE-754 double arithmetic. It also checks that
// the result of a lone operation appears exactly 15 cycles after it entered.
module tb_fp64_mul;
  localparam int LAT = 15;
  localparam int N   = 4000;

  logic        clk = 0;
  logic        sclr;
  logic [63:0] a, b, result;
  logic        nd, rfd, rdy;
  int checks = 0, failures = 0;

  fp64_mul dut (.clk, .sclr, .a, .b, .operation_nd(nd), .operation_rfd(rfd), .result, .rdy);

  always #5 clk = ~clk;

  logic [63:0] exp_q [$];

  function automatic logic [63:0] rnd_num();
    logic [63:0] v;
    int unsigned k;
    k = $urandom_range(0, 19);
    v = {$urandom(), $urandom()};
    case (k)
      0: return {v[63], 63'd0};                        // signed zero
      1: return {v[63], 11'h7ff, 52'd0};               // infinity
      2: return {1'b0, 11'h7ff, 1'b1, 51'd0};          // NaN
      3: return {v[63], 11'(1023 + $urandom_range(0, 8)), 52'(v[51:45]) << 45}; // short mantissas
      default: return {v[63], 11'(1023 - 200 + $urandom_range(0, 400)), v[51:0]};
    endcase
  endfunction

  function automatic logic [63:0] ref_op(input logic [63:0] a, input logic [63:0] b);
    real r;
    r = $bitstoreal(a) * $bitstoreal(b);
    return $realtobits(r);
  endfunction

  function automatic bit is_nan(input logic [63:0] v);
    return v[62:52] == 11'h7ff && v[51:0] != '0;
  endfunction

  // checker
  always @(posedge clk) begin
    if (rdy && !sclr) begin
      logic [63:0] e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", result);
      end else begin
        e = exp_q.pop_front();
        if (is_nan(e) ? !is_nan(result) : (result !== e)) begin
          failures++;
          if (failures < 10) $display("FAIL: got %h expected %h", result, e);
        end
      end
    end
  end

  initial begin
    int lat;
    sclr = 1; nd = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 sclr = 0;
    // latency of a single operation
    @(negedge clk);
    a = 64'h4000000000000000; b = 64'h4008000000000000; nd = 1;
    exp_q.push_back(ref_op(a, b));
    @(negedge clk); nd = 0;
    lat = 1;
    while (!rdy && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL: latency %0d expected %0d", lat, LAT); end
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      if ($urandom_range(0, 7) == 0) begin
        nd = 0;
      end else begin
        a = rnd_num(); b = rnd_num();
        if ($urandom_range(0, 15) == 0) b = a ^ 64'h8000000000000000;  // cancellation
        nd = 1;
        exp_q.push_back(ref_op(a, b));
      end
      @(negedge clk);
    end
    nd = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end
    if (!rfd) begin failures++; $display("FAIL: rfd low"); end
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

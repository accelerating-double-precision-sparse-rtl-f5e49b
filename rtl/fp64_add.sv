// fp64_add: IEEE-754 double-precision adder with a fixed pipeline latency.
//
// The design uses a fully IEEE-754 compliant, pipelined double adder as the
// accumulator of each processing element and in the reduction tree, with the
// same operation_nd / operation_rfd / sclr / rdy interface as the multiplier.
// The default depth of 12 stages is the accumulator adder's. The arithmetic is
// this design's own: operands are ordered by magnitude, the smaller one is
// aligned with guard, round and sticky bits, the sum is normalised with a
// leading-zero count and rounded to nearest-even in one combinational step,
// then carried through LAT register stages for synthesis retiming. Subnormal
// operands and results are flushed to signed zero; an exact zero sum of
// operands of opposite sign is +0; infinities and NaN follow IEEE-754.
//
// Timing: operands presented with nd=1 in cycle t give result with rdy=1 in
// cycle t+LAT. rfd is low only while sclr is asserted.
module fp64_add #(
  parameter int LAT = 12
) (
  input  logic        clk,
  input  logic        sclr,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        operation_nd,
  output logic        operation_rfd,
  output logic [63:0] result,
  output logic        rdy
);

  function automatic logic [63:0] fadd(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] big, sml;
    logic        sb, ss, sub;
    logic [10:0] eb, es;
    logic [11:0] d;
    logic [55:0] mb, ms, sh;        // 1.f + guard, round, sticky
    logic [56:0] sum;
    logic signed [13:0] e;
    int unsigned lz;
    logic [52:0] m;
    logic        up;
    logic [53:0] mr;
    logic        xi, yi, xn, yn;
    xi = (x[62:52] == 11'h7ff) && x[51:0] == '0;
    yi = (y[62:52] == 11'h7ff) && y[51:0] == '0;
    xn = (x[62:52] == 11'h7ff) && x[51:0] != '0;
    yn = (y[62:52] == 11'h7ff) && y[51:0] != '0;
    if (xn || yn || (xi && yi && x[63] != y[63])) return {1'b0, 11'h7ff, 1'b1, 51'd0};
    if (xi) return x;
    if (yi) return y;
    // flush subnormals to zero
    if (x[62:52] == 11'd0) x = {x[63], 63'd0};
    if (y[62:52] == 11'd0) y = {y[63], 63'd0};
    if (x[62:0] == '0 && y[62:0] == '0) return {x[63] & y[63], 63'd0};
    if (x[62:0] == '0) return y;
    if (y[62:0] == '0) return x;
    if (x[62:0] >= y[62:0]) begin big = x; sml = y; end
    else                    begin big = y; sml = x; end
    sb = big[63]; ss = sml[63]; sub = sb ^ ss;
    eb = big[62:52]; es = sml[62:52];
    d  = 12'(eb) - 12'(es);
    mb = {1'b1, big[51:0], 3'b000};
    ms = {1'b1, sml[51:0], 3'b000};
    if (d >= 12'd56) sh = 56'd1;
    else begin
      sh = ms >> d;
      if ((ms & ((56'd1 << d) - 56'd1)) != '0) sh[0] = 1'b1;
    end
    sum = sub ? ({1'b0, mb} - {1'b0, sh}) : ({1'b0, mb} + {1'b0, sh});
    if (sum == '0) return 64'd0;
    e = 14'(eb);
    if (sum[56]) begin
      sum = {1'b0, sum[56:2], sum[1] | sum[0]};
      e = e + 14'sd1;
    end else begin
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - 14'(lz);
    end
    m  = sum[55:3];
    up = sum[2] && (sum[1] || sum[0] || m[0]);
    mr = {1'b0, m} + 54'(up);
    if (mr[53]) begin
      mr = mr >> 1; e = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {sb, 11'h7ff, 52'd0};
    if (e <= 14'sd0)    return {sb, 63'd0};
    return {sb, e[10:0], mr[51:0]};
  endfunction

  logic [63:0] res_q [LAT];
  logic        vld_q [LAT];

  always_ff @(posedge clk) begin
    res_q[0] <= fadd(a, b);
    vld_q[0] <= operation_nd && !sclr;
    for (int i = 1; i < LAT; i++) begin
      res_q[i] <= res_q[i-1];
      vld_q[i] <= vld_q[i-1] && !sclr;
    end
  end

  assign result        = res_q[LAT-1];
  assign rdy           = vld_q[LAT-1];
  assign operation_rfd = !sclr;

endmodule

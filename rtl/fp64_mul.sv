// fp64_mul: IEEE-754 double-precision multiplier with a fixed pipeline latency.
//
// The design calls for a fully IEEE-754 compliant, deeply pipelined double
// multiplier with an operation_nd / operation_rfd input handshake, a
// synchronous clear of its control path, and a result with a result-valid
// (rdy) flag. The default depth of 15 stages is that of the processing
// element's multiplier. The arithmetic itself is this design's own: the
// product is formed and rounded to nearest-even in one combinational step,
// then carried through LAT register stages so that synthesis can retime it.
// Subnormal operands and results are flushed to signed zero; infinities and
// NaN (quiet, canonical) follow IEEE-754.
//
// Timing: an operand pair presented with nd=1 in cycle t appears on result
// with rdy=1 in cycle t+LAT. rfd is low only while sclr is asserted. The
// clock enable is permanently on: a bubble is simply nd=0.
module fp64_mul #(
  parameter int LAT = 15
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

  function automatic logic [63:0] fmul(input logic [63:0] x, input logic [63:0] y);
    logic         s;
    logic [10:0]  ex, ey;
    logic [51:0]  fx, fy;
    logic [105:0] p;
    logic [52:0]  m;
    logic         g, st, up;
    logic [53:0]  mr;
    logic signed [13:0] e;
    logic         xz, yz, xi, yi, xn, yn;
    s  = x[63] ^ y[63];
    ex = x[62:52]; ey = y[62:52];
    fx = x[51:0];  fy = y[51:0];
    xz = (ex == 11'd0);               yz = (ey == 11'd0);
    xi = (ex == 11'h7ff) && fx == '0; yi = (ey == 11'h7ff) && fy == '0;
    xn = (ex == 11'h7ff) && fx != '0; yn = (ey == 11'h7ff) && fy != '0;
    if (xn || yn || (xi && yz) || (yi && xz)) return {1'b0, 11'h7ff, 1'b1, 51'd0};
    if (xi || yi) return {s, 11'h7ff, 52'd0};
    if (xz || yz) return {s, 63'd0};
    p = {1'b1, fx} * {1'b1, fy};
    e = 14'(ex) + 14'(ey) - 14'sd1023;
    if (p[105]) begin
      m  = p[105:53]; g = p[52]; st = |p[51:0]; e = e + 14'sd1;
    end else begin
      m  = p[104:52]; g = p[51]; st = |p[50:0];
    end
    up = g && (st || m[0]);
    mr = {1'b0, m} + 54'(up);
    if (mr[53]) begin
      mr = mr >> 1; e = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {s, 11'h7ff, 52'd0};
    if (e <= 14'sd0)    return {s, 63'd0};
    return {s, e[10:0], mr[51:0]};
  endfunction

  logic [63:0] res_q [LAT];
  logic        vld_q [LAT];

  always_ff @(posedge clk) begin
    res_q[0] <= fmul(a, b);
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

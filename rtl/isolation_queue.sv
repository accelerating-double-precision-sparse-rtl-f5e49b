// isolation_queue: FIFO between the multiplier and the accumulating adder.
//
// The multiplier pipeline is never stalled; when the accumulator cannot take a
// product (its partial-sum half is still being emptied, or the adder is not
// ready), products wait here. The queue therefore needs room for everything
// already inside the vector read and multiplier pipelines: DEPTH defaults to
// the multiplier latency plus two (the vector read latency).
//
// As in the document, the queue is split into two FIFOs under one control: a
// 64-bit data FIFO for the product and a narrower tag FIFO (row offset with its
// partial-sum buffer bit, end-of-matrix, rowstrip index; here also the null
// flag) so that the tag bits, which feed memory addresses after the queue, can
// be kept in fast distributed storage apart from the data.
//
// Interface and timing: push writes push_data/push_tag in the cycle it is high;
// the head is visible combinationally on pop_data/pop_tag while empty is low,
// and pop removes it at the clock edge. count is the number of entries. A push
// into a full queue or a pop from an empty one is an error (asserted).
module isolation_queue
  import spmv_pkg::*;
#(
  parameter int DEPTH = MULT_LAT + VEC_RD_LAT
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      push,
  input  dword_t    push_data,
  input  psum_tag_t push_tag,
  input  logic      pop,
  output dword_t    pop_data,
  output psum_tag_t pop_tag,
  output logic      empty,
  output logic      full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = $clog2(DEPTH);

  dword_t    data_q [DEPTH];
  psum_tag_t tag_q  [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty    = (count == 0);
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign pop_data = data_q[rp];
  assign pop_tag  = tag_q[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= incr(wp);
      if (pop)  rp <= incr(rp);
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  // data and tag FIFOs share the pointers
  always_ff @(posedge clk) begin
    if (push) begin
      data_q[wp] <= push_data;
      tag_q[wp]  <= push_tag;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> !full || pop);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);

endmodule

// reduction_tree: sums the partial-sum blocks of all processing elements.
//
// The entries of one matrix row are spread over the processing elements, so
// every element holds a partial sum for every row of the rowstrip. When all
// elements have finished a rowstrip they stream their blocks out in the same
// cycles (4 doubles per cycle), and this tree adds the N streams lane by lane
// into the final result rows.
//
// How it works. A binary tree of double-precision adders, ceil(log2 N) levels
// deep and WORDS lanes wide; at a level with an odd number of inputs the last
// one is delayed by one adder latency instead of added. Valid and last flags
// travel in a matching shift register. The document gives the tree's function
// and its log N depth; the pairing and the adder latency are this design's.
//
// Timing: a row presented in cycle t leaves in cycle t + LEVELS * ADD_LAT.
// The tree accepts one row per cycle and never stalls.
module reduction_tree
  import spmv_pkg::*;
#(
  parameter int N   = 5,
  parameter int LAT = ADD_LAT
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  logic   in_last,
  input  dword_t in_data [N][WORDS],
  output logic   out_valid,
  output logic   out_last,
  output dword_t out_data [WORDS]
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 0;

  // number of nodes at level l
  function automatic int nodes(input int l);
    int n = N;
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  dword_t lv [LEVELS+1][N][WORDS];

  for (genvar j = 0; j < N; j++) begin : g_in
    assign lv[0][j] = in_data[j];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar j = 0; j < nodes(l + 1); j++) begin : g_node
      if (2 * j + 1 < nodes(l)) begin : g_add
        for (genvar w = 0; w < WORDS; w++) begin : g_lane
          fp64_add #(.LAT(LAT)) u_add (
            .clk, .sclr (rst),
            .a (lv[l][2*j][w]), .b (lv[l][2*j+1][w]),
            .operation_nd (1'b1), .operation_rfd (),
            .result (lv[l+1][j][w]), .rdy ()
          );
        end
      end else begin : g_pass
        dword_t dly [LAT][WORDS];
        always_ff @(posedge clk) begin
          dly[0] <= lv[l][2*j];
          for (int i = 1; i < LAT; i++) dly[i] <= dly[i-1];
        end
        assign lv[l+1][j] = dly[LAT-1];
      end
    end
    // unused upper nodes of this level
    for (genvar j = nodes(l + 1); j < N; j++) begin : g_unused
      assign lv[l+1][j] = '{default: '0};
    end
  end

  localparam int TOT = LEVELS * LAT;
  logic [TOT:0] vld_q, last_q;
  assign vld_q[0]  = in_valid;
  assign last_q[0] = in_last;
  always_ff @(posedge clk) begin
    if (rst) vld_q[TOT:1] <= '0;
    else     vld_q[TOT:1] <= vld_q[TOT-1:0];
    last_q[TOT:1] <= last_q[TOT-1:0];
  end

  assign out_valid = vld_q[TOT];
  assign out_last  = last_q[TOT];
  assign out_data  = lv[LEVELS][0];

endmodule

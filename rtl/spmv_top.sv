// spmv_top: double-precision sparse matrix-vector multiplier y = A x for the
// relatively dense part of a large sparse matrix held in external DRAM.
//
// What it does. The matrix is cut into 128 x 128 blocks and only the dense
// blocks are processed here, in row-major block order. The entries of each
// dense block are divided among N_PE processing elements by an off-line
// schedule; all elements work on the same block at a time. Every element
// receives the vector block belonging to the current matrix block (broadcast,
// 4 doubles per cycle, 32 cycles per block), multiplies its entries with it
// and accumulates per-row partial sums for the current rowstrip. At the end of
// each rowstrip the N_PE partial-sum blocks leave together and a reduction
// tree adds them into 32 rows of 4 result elements. Rowstrips without dense
// blocks come out as zero blocks, so y leaves complete and in order.
//
// Structure: N_PE x spmv_pe (vector_cache, fp64_mul, isolation_queue, fp64_add,
// psum_storage, psum_ctrl_fsm) -> reduction_tree. The DRAM memory controllers
// are outside: each element has its own matrix entry stream (adata, 128-bit
// words as read from a pair of 32-bit DDR banks; bits 95:0 are used, see
// spmv_pkg), and one vector stream is broadcast to all elements.
//
// Interface and timing.
//   adata[p]/avalid[p]/aack[p]: entry stream of element p, taken when aack.
//   xin/xvalid/xeod/xdata_ack: vector stream; a beat goes to every element in
//     a cycle with xvalid && xdata_ack; xdata_ack is high when every element has
//     a free vector half and does not depend on xvalid. xeod marks beat 32.
//   yout/yvalid/ylast: result rows, y[4r .. 4r+3] for r = 0, 1, ..., ylast on
//     the last row of each 128-element block.
//   n_rowstrips: length of y in blocks of 128. done: all of y has left.
// A block of partial sums leaves only when every element has it ready (the
// go handshake); the tree adds 3 x 12 cycles of latency for 5 elements.
// Following the document: 5 elements, block size, broadcast vector blocks,
// per-element partial sums reduced by a log-depth tree, zero-filled result.
// This design's own: the go handshake and the all-element xdata_ack.
//
// Beside the multiplier, and independent of it, stands the small embedded
// version: one processing element packaged as a peripheral of a 32-bit
// processor bus (spmv_periph), whose data a processor and a DMA engine move
// through memory spaces under interrupt control. Its bus port (emb_*) is
// described in spmv_periph.
module spmv_top
  import spmv_pkg::*;
#(
  parameter int N_PE = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [ROWSTRIP_WIDTH:0] n_rowstrips,
  // matrix entry streams, one per processing element
  input  logic         avalid [N_PE],
  input  logic [127:0] adata  [N_PE],
  output logic         aack   [N_PE],
  // broadcast vector block stream
  input  logic         xvalid,
  output logic         xdata_ack,
  input  logic         xeod,
  input  dword_t       xin [WORDS],
  // result vector
  output logic         yvalid,
  output logic         ylast,
  output dword_t       yout [WORDS],
  output logic         done,
  // embedded single-element peripheral, bus side
  input  logic [1:0]   emb_bus_space,
  input  logic [7:0]   emb_bus_addr,
  input  logic         emb_bus_we,
  input  logic [31:0]  emb_bus_wdata,
  output logic [31:0]  emb_bus_rdata,
  output logic         emb_irq
);

  logic   pe_xack  [N_PE];
  logic   blk_rdy  [N_PE];
  logic   pvalid   [N_PE];
  logic   plast    [N_PE];
  logic   pe_done  [N_PE];
  dword_t pdata    [N_PE][WORDS];
  logic   go, all_xack, all_done;

  always_comb begin
    go = 1'b1; all_xack = 1'b1; all_done = 1'b1;
    for (int p = 0; p < N_PE; p++) begin
      go       &= blk_rdy[p];
      all_xack &= pe_xack[p];
      all_done &= pe_done[p];
    end
  end

  assign xdata_ack = all_xack;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    spmv_pe u_pe (
      .clk, .rst, .n_rowstrips,
      .avalid (avalid[p]),
      .adata  (mat_entry_t'(adata[p][ENTRY_W-1:0])),
      .aack   (aack[p]),
      .xvalid (xvalid && all_xack),
      .xdata_ack (pe_xack[p]),
      .xeod,
      .xin,
      .blk_rdy (blk_rdy[p]),
      .go,
      .pvalid (pvalid[p]),
      .pdata  (pdata[p]),
      .plast  (plast[p]),
      .done   (pe_done[p])
    );
  end

  reduction_tree #(.N(N_PE)) u_tree (
    .clk, .rst,
    .in_valid (pvalid[0]),
    .in_last  (plast[0]),
    .in_data  (pdata),
    .out_valid(yvalid),
    .out_last (ylast),
    .out_data (yout)
  );

  // done once the last rows have left the tree
  localparam int TREE_LAT = ((N_PE > 1) ? $clog2(N_PE) : 0) * ADD_LAT;
  logic [TREE_LAT:0] done_q;
  always_ff @(posedge clk) begin
    if (rst) done_q <= '0;
    else     done_q <= {done_q[TREE_LAT-1:0], all_done};
  end
  assign done = done_q[TREE_LAT];

  spmv_periph u_emb (
    .clk, .rst,
    .bus_space (emb_bus_space),
    .bus_addr  (emb_bus_addr),
    .bus_we    (emb_bus_we),
    .bus_wdata (emb_bus_wdata),
    .bus_rdata (emb_bus_rdata),
    .irq       (emb_irq)
  );

  // all elements stream their blocks in lock step
  for (genvar p = 1; p < N_PE; p++) begin : g_chk
    a_lockstep: assert property (@(posedge clk) disable iff (rst) pvalid[p] == pvalid[0]);
  end

endmodule

// spmv_pe: one SpMxV processing element (Design B organisation).
//
// What it does. It takes this element's share of the matrix entries of the
// dense 128 x 128 blocks, in block order, multiplies each entry by the element
// of the input vector x selected by its column, and accumulates the product
// into the partial sum of its row. At the end of every rowstrip it hands the
// 128 partial sums out as 32 rows of 4 doubles; a rowstrip without entries
// yields a zero block, so the output covers the whole result vector.
//
// How it works. Two pipelines, each without a stall signal, are joined by the
// isolation queue:
//   upper: entry accepted -> vector cache read (2 cycles) -> multiplier (15)
//          -> isolation queue. An entry is accepted only when it is valid, its
//          vector block is loaded (astop low), the floating-point units have
//          finished their start-up wait, the end of matrix has not been
//          accepted yet, and the queue has room for everything in flight; in
//          every other cycle the pipeline simply carries a bubble.
//   lower: queue head -> partial-sum read (3 cycles) -> adder (12) -> partial
//          sum written back. The head is taken when the queue is not empty,
//          the start-up wait is over and clkout_busy (from psum_ctrl_fsm) is
//          low; otherwise a bubble enters.
// A product and the partial sum it updates form a loop of 16 cycles: an entry
// taken in cycle t writes its row at the end of cycle t+15, so a later entry
// of the same row (same partial-sum half) must be taken at t+16 or later. The
// hardware does not check this at run time; the matrix pre-processing orders
// each element's entries so that equal rows are at least 16 entries apart,
// inserting null entries where needed (an assertion reports violations in
// simulation). Null entries flow through like others but update nothing.
// A 33-cycle counter after reset models the start-up time the floating-point
// units need before they accept data; the units' synchronous clears are held
// during reset.
//
// Interface and timing. Matrix: avalid/adata/aack, an entry is consumed in a
// cycle with aack high (aack never rises without avalid). Vector:
// xvalid/xdata_ack/xeod/xin, see vector_cache. Result: blk_rdy/go as in
// psum_ctrl_fsm; pvalid/pdata/plast carry the block rows, two cycles after the
// element's go-synchronised stream. n_rowstrips: rows of the result vector /
// 128. done: this element has emitted its last block.
// Following the document: the two-pipeline organisation with null insertion,
// its stall conditions, the pipeline depths (2 + 15 and 4 + 12 counting the
// cycle the head is taken), the 33-count start-up wait. This design's own: the
// credit rule for the queue and its depth of multiplier latency + 3 (one more
// than the document's bound, because an entry written into the queue can be
// taken out only in the next cycle), the null flag, the go handshake.
module spmv_pe
  import spmv_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [ROWSTRIP_WIDTH:0] n_rowstrips,
  // matrix entries
  input  logic       avalid,
  input  mat_entry_t adata,
  output logic       aack,
  // vector blocks
  input  logic       xvalid,
  output logic       xdata_ack,
  input  logic       xeod,
  input  dword_t     xin [WORDS],
  // partial-sum blocks
  output logic       blk_rdy,
  input  logic       go,
  output logic       pvalid,
  output dword_t     pdata [WORDS],
  output logic       plast,
  output logic       done
);

  localparam int QDEPTH = MULT_LAT + VEC_RD_LAT + 1;
  localparam int QCW    = $clog2(QDEPTH + 1);

  // ---------------------------------------------------------------- start-up
  logic [5:0] init_cnt;
  logic       fp_busy;
  always_ff @(posedge clk) begin
    if (rst)                           init_cnt <= '0;
    else if (init_cnt != 6'(INIT_COUNT)) init_cnt <= init_cnt + 6'd1;
  end

  logic mult_rfd, add_rfd;
  assign fp_busy = (init_cnt != 6'(INIT_COUNT)) || !mult_rfd || !add_rfd;

  // ---------------------------------------------------------- upper pipeline
  logic       astop, vector_blk_rdy, eom_taken, accept;
  dword_t     xval;
  logic [QCW-1:0] q_count;
  logic [QCW-1:0] inflight;
  logic       q_push, q_pop, q_empty, q_full;
  dword_t     q_data, product;
  psum_tag_t  q_tag, adata_tag;

  assign adata_tag = '{rowstrip: adata.rowstrip, is_null: adata.is_null, eom: adata.eom,
                       pbuf: adata.pbuf, row: adata.row};

  // null insertion at the head: accept only when nothing stops the entry and
  // the queue could still take every entry in flight if the lower pipeline
  // stopped from now on
  assign accept = avalid && !astop && !fp_busy && !eom_taken &&
                  (32'(q_count) + 32'(inflight) < QDEPTH + 32'(q_pop));
  assign aack   = accept;

  vector_cache u_vcache (
    .clk, .rst,
    .xvalid, .xdata_ack, .xeod, .xin,
    .head_valid (avalid && !eom_taken),
    .head_vbuf  (adata.vbuf),
    .astop, .vector_blk_rdy,
    .rd_en   (accept),
    .rd_vbuf (adata.vbuf),
    .rd_col  (adata.col),
    .rd_data (xval)
  );

  // match the vector read latency
  logic      v_vr   [VEC_RD_LAT];
  dword_t    val_vr [VEC_RD_LAT];
  psum_tag_t tag_vr [VEC_RD_LAT];
  always_ff @(posedge clk) begin
    for (int i = 0; i < VEC_RD_LAT; i++) begin
      v_vr[i]   <= (i == 0) ? (accept && !rst) : (v_vr[i-1] && !rst);
      val_vr[i] <= (i == 0) ? adata.value : val_vr[i-1];
      tag_vr[i] <= (i == 0) ? adata_tag   : tag_vr[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                     eom_taken <= 1'b0;
    else if (accept && adata.eom) eom_taken <= 1'b1;
  end

  fp64_mul #(.LAT(MULT_LAT)) u_mul (
    .clk, .sclr(rst),
    .a (val_vr[VEC_RD_LAT-1]), .b (xval),
    .operation_nd (v_vr[VEC_RD_LAT-1]), .operation_rfd (mult_rfd),
    .result (product), .rdy (q_push)
  );

  psum_tag_t tag_m [MULT_LAT];
  always_ff @(posedge clk) begin
    tag_m[0] <= tag_vr[VEC_RD_LAT-1];
    for (int i = 1; i < MULT_LAT; i++) tag_m[i] <= tag_m[i-1];
  end

  // entries between the head and the queue
  always_ff @(posedge clk) begin
    if (rst) inflight <= '0;
    else     inflight <= inflight + QCW'(accept) - QCW'(q_push);
  end

  isolation_queue #(.DEPTH(QDEPTH)) u_queue (
    .clk, .rst,
    .push (q_push), .push_data (product), .push_tag (tag_m[MULT_LAT-1]),
    .pop (q_pop), .pop_data (q_data), .pop_tag (q_tag),
    .empty (q_empty), .full (q_full), .count (q_count)
  );

  // ---------------------------------------------------------- lower pipeline
  logic clkout_busy, init_busy, fsm_done;
  logic so_en, so_buf, clr_en, out_en, out_zero, out_last;
  logic [4:0] so_addr, clr_addr;
  logic [1:0] clr_mask;

  assign q_pop = !q_empty && !clkout_busy && !fp_busy && !init_busy;

  psum_ctrl_fsm u_ctrl (
    .clk, .rst, .n_rowstrips,
    .head_valid (!q_empty), .head_tag (q_tag), .pop (q_pop),
    .clkout_busy, .init_busy, .blk_rdy, .go,
    .so_en, .so_buf, .so_addr, .clr_en, .clr_mask, .clr_addr,
    .out_en, .out_zero, .out_last, .done (fsm_done)
  );

  // partial-sum read latency
  logic      v_pr   [PSUM_RD_LAT];
  dword_t    prod_pr[PSUM_RD_LAT];
  psum_tag_t tag_pr [PSUM_RD_LAT];
  always_ff @(posedge clk) begin
    for (int i = 0; i < PSUM_RD_LAT; i++) begin
      v_pr[i]    <= (i == 0) ? (q_pop && !q_tag.is_null && !rst) : (v_pr[i-1] && !rst);
      prod_pr[i] <= (i == 0) ? q_data : prod_pr[i-1];
      tag_pr[i]  <= (i == 0) ? q_tag  : tag_pr[i-1];
    end
  end

  dword_t psum_old, psum_new;
  logic   add_rdy;
  dword_t so_data [WORDS];

  fp64_add #(.LAT(ADD_LAT)) u_add (
    .clk, .sclr(rst),
    .a (psum_old), .b (prod_pr[PSUM_RD_LAT-1]),
    .operation_nd (v_pr[PSUM_RD_LAT-1]), .operation_rfd (add_rfd),
    .result (psum_new), .rdy (add_rdy)
  );

  psum_tag_t tag_a [ADD_LAT];
  always_ff @(posedge clk) begin
    tag_a[0] <= tag_pr[PSUM_RD_LAT-1];
    for (int i = 1; i < ADD_LAT; i++) tag_a[i] <= tag_a[i-1];
  end

  psum_storage u_psum (
    .clk,
    .acc_rd_en  (q_pop && !q_tag.is_null),
    .acc_rd_buf (q_tag.pbuf),
    .acc_rd_row (q_tag.row),
    .acc_rd_data(psum_old),
    .acc_wr_en  (add_rdy),
    .acc_wr_buf (tag_a[ADD_LAT-1].pbuf),
    .acc_wr_row (tag_a[ADD_LAT-1].row),
    .acc_wr_data(psum_new),
    .so_en, .so_buf, .so_addr, .so_data,
    .clr_en, .clr_mask, .clr_addr
  );

  // ------------------------------------------------------------------ output
  logic [1:0] oen_q, ozero_q, olast_q;
  logic [2:0] done_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      oen_q  <= '0;
      done_q <= '0;
    end else begin
      oen_q  <= {oen_q[0], out_en};
      done_q <= {done_q[1:0], fsm_done};
    end
    ozero_q <= {ozero_q[0], out_zero};
    olast_q <= {olast_q[0], out_last};
  end

  assign pvalid = oen_q[1];
  assign plast  = olast_q[1];
  assign done   = done_q[2];
  always_comb for (int w = 0; w < WORDS; w++) pdata[w] = ozero_q[1] ? '0 : so_data[w];

  // ------------------------------------------------------------- assertions
  // read-after-write rule of the accumulator loop: no entry may read a
  // partial sum whose update is still on its way through the loop
  logic add_vld_chk [ADD_LAT];
  always_ff @(posedge clk) begin
    add_vld_chk[0] <= v_pr[PSUM_RD_LAT-1] && !rst;
    for (int i = 1; i < ADD_LAT; i++) add_vld_chk[i] <= add_vld_chk[i-1] && !rst;
  end

  function automatic logic raw_hazard();
    logic h = 1'b0;
    for (int i = 0; i < PSUM_RD_LAT; i++)
      h |= v_pr[i] && tag_pr[i].pbuf == q_tag.pbuf && tag_pr[i].row == q_tag.row;
    for (int i = 0; i < ADD_LAT; i++)
      h |= add_vld_chk[i] && tag_a[i].pbuf == q_tag.pbuf && tag_a[i].row == q_tag.row;
    return h;
  endfunction

  a_no_raw_hazard: assert property (@(posedge clk) disable iff (rst)
    q_pop && !q_tag.is_null |-> !raw_hazard())
    else $error("read-after-write hazard on row %0d", q_tag.row);
  a_queue_room: assert property (@(posedge clk) disable iff (rst) q_push |-> !q_full);
  a_adder_ready: assert property (@(posedge clk) disable iff (rst) add_rdy |-> !init_busy);

endmodule

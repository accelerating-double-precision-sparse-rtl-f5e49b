// vector_cache: local vector storage of one processing element, with the
// control that fetches vector blocks into it (Design B style).
//
// What it does. The matrix is processed in 128 x 128 blocks; each block needs
// the matching 128-element block of the input vector x. The storage holds two
// such blocks in ping-pong fashion: while the multiplier reads the block of
// the matrix block in progress from one half, the next vector block is written
// into the other half. Storage is 4 doubles wide and 64 rows deep (32 rows per
// half), so a whole block arrives in 32 cycles at 4 words per cycle.
//
// How it works. A column offset col[6:0] together with the entry's vector
// buffer bit vbuf is split into a storage row {vbuf, col[6:2]} and a word
// select col[1:0]. The memory has a registered output, so read data appears at
// the end of the second cycle after the read; the word select is carried along
// in a 2-stage shift register to steer the output multiplexer at that time.
// The fetch control FSM counts the loaded halves: S_EMPTY (none), S_CNT1 (the
// half in use is loaded, the other is being filled) and S_CNT2 (both loaded,
// no more vector data accepted). vector_blk_rdy is high in S_CNT1 and S_CNT2.
// No block number is needed: when the entry at the head of the matrix stream
// carries the other vbuf value than the half in use, the half in use is
// released (the previous matrix block is finished) and the other half becomes
// current. astop is raised while the head entry's half is not yet loaded.
//
// Interface and timing. Vector side: xvalid, xin[0..3], xeod (last of the 32
// beats of a block) from the vector fetch unit; xdata_ack is this design's
// "ready": a beat is written in every cycle with xvalid && xdata_ack, and
// xdata_ack does not depend on xvalid. Matrix side: head_valid/head_vbuf give
// the entry at the head of the matrix stream (used for astop and release);
// rd_en/rd_vbuf/rd_col read one word, valid on rd_data two cycles later.
// Following the document: ping-pong halves, 4-wide by 64-deep organisation, the
// registered 2-cycle read with delayed select, the xvalid/xdata_ack/xeod/xin
// interface, vector_blk_rdy in the two "count" states and release by buffer
// bit. This design's choices: the state encoding and the exact release rule.
module vector_cache
  import spmv_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  // vector fetch side
  input  logic   xvalid,
  output logic   xdata_ack,
  input  logic   xeod,
  input  dword_t xin [WORDS],
  // head of the matrix stream
  input  logic   head_valid,
  input  logic   head_vbuf,
  output logic   astop,
  output logic   vector_blk_rdy,
  // read port for the multiplier
  input  logic       rd_en,
  input  logic       rd_vbuf,
  input  logic [6:0] rd_col,
  output dword_t     rd_data
);

  typedef enum logic [1:0] {S_EMPTY, S_CNT1, S_CNT2} vstate_e;
  vstate_e state;

  logic       rbuf;                 // half holding the block in use
  logic [4:0] waddr;                // row inside the half being filled
  logic       wbuf;
  logic       wr, load_done, release_cur;

  assign wbuf        = (state == S_EMPTY) ? rbuf : !rbuf;
  assign xdata_ack   = (state != S_CNT2);
  assign wr          = xvalid && xdata_ack;
  assign load_done   = wr && xeod;
  assign release_cur = head_valid && (head_vbuf != rbuf) && (state == S_CNT2);
  assign vector_blk_rdy = (state == S_CNT1) || (state == S_CNT2);

  // the head entry may go when its half holds a complete block
  always_comb begin
    if (!head_valid)            astop = 1'b0;
    else if (head_vbuf == rbuf) astop = (state == S_EMPTY);
    else                        astop = (state != S_CNT2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_EMPTY;
      rbuf  <= 1'b0;
      waddr <= '0;
    end else begin
      if (wr) waddr <= xeod ? 5'd0 : waddr + 5'd1;
      unique case (state)
        S_EMPTY: if (load_done) state <= S_CNT1;
        S_CNT1:  if (load_done) state <= S_CNT2;
        S_CNT2:  if (release_cur) begin
                   state <= S_CNT1;
                   rbuf  <= !rbuf;
                 end
        default: state <= S_EMPTY;
      endcase
    end
  end

  // storage: 64 rows of 4 doubles, simple dual port, registered output
  logic [WORDS*64-1:0] mem [2*BUF_DEPTH];
  logic [WORDS*64-1:0] mem_lat, mem_out;
  logic [1:0]          sel_q [VEC_RD_LAT];

  always_ff @(posedge clk) begin
    if (wr) mem[{wbuf, waddr}] <= {xin[3], xin[2], xin[1], xin[0]};
    if (rd_en) mem_lat <= mem[{rd_vbuf, rd_col[6:2]}];
    mem_out  <= mem_lat;
    sel_q[0] <= rd_col[1:0];
    sel_q[1] <= sel_q[0];
  end

  assign rd_data = mem_out[sel_q[VEC_RD_LAT-1]*64 +: 64];

  // a vector block is exactly 32 beats long
  a_eod_aligned: assert property (@(posedge clk) disable iff (rst)
    wr |-> (xeod == (waddr == 5'(BUF_DEPTH - 1))));

endmodule

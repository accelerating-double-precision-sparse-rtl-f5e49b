// psum_ctrl_fsm: partial-sum transfer control of one processing element.
//
// What it does. The result vector leaves the processing elements one 128-row
// block per rowstrip, in rowstrip order and without gaps: a rowstrip that has
// no dense block at all still gets a block of zeros. The controller watches
// the rowstrip index of each entry the accumulator takes. When the index
// changes, the half of the partial-sum storage used by the old rowstrip is
// streamed out (4 words per cycle, 32 cycles) and cleared one row behind the
// read, and then one zero block is emitted for every rowstrip skipped
// (difference of the indices minus one). Zero blocks before the first rowstrip
// and, after the end-of-matrix entry, up to n_rowstrips are emitted too.
//
// How it works. States: S_INIT clears both halves after reset; S_IDLE;
// S_DRAIN waits until the last products of the old rowstrip have left the
// accumulator loop (PSUM_RD_LAT + ADD_LAT + 1 cycles); S_BLK_WAIT and
// SZBLOCK_WAIT hold a finished block until go; S_STREAM reads and clears the
// old half; SZBLOCK emits a zero block; S_DONE after the last block. The
// rowstrip difference is captured into zeros_left when the change is seen, so
// later states only test zeros_left (the document's szblock_wait state serves
// the same purpose: keeping the difference out of its own update logic).
// While a half is waiting to be or being emptied, clkout_busy holds back an
// entry that would accumulate into it; entries of a further rowstrip are held
// back until the controller is idle again.
//
// Interface and timing. head_valid/head_tag: the entry offered to the
// accumulator; pop: it is taken this cycle. blk_rdy: a block is ready to go
// out; go: all processing elements are ready, start it now (tie go to blk_rdy
// for a lone element). so_*/clr_*: storage control. out_en/out_zero: a row of
// the result block is produced this cycle (from storage, or zeros); the row's
// data leaves the storage two cycles later. out_last marks the last row of a
// block. done: every block up to n_rowstrips has been emitted.
// Following the document: comparison of old and new rowstrip index, stream
// then zero-block insertion, clearing behind the read, ping-pong halves. This
// design's own: the drain wait, the go handshake, the init clear and the
// leading/trailing zero blocks via n_rowstrips.
module psum_ctrl_fsm
  import spmv_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic [ROWSTRIP_WIDTH:0] n_rowstrips,
  input  logic      head_valid,
  input  psum_tag_t head_tag,
  input  logic      pop,
  output logic      clkout_busy,
  output logic      init_busy,
  output logic      blk_rdy,
  input  logic      go,
  output logic      so_en,
  output logic      so_buf,
  output logic [4:0] so_addr,
  output logic      clr_en,
  output logic [1:0] clr_mask,
  output logic [4:0] clr_addr,
  output logic      out_en,
  output logic      out_zero,
  output logic      out_last,
  output logic      done
);

  localparam int DRAIN_CYC = PSUM_RD_LAT + ADD_LAT + 1;

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_DRAIN, S_BLK_WAIT, S_STREAM, SZBLOCK_WAIT, SZBLOCK, S_DONE
  } pstate_e;

  pstate_e state;
  logic    have_rs, cur_pbuf, stream_buf, final_pend, finalizing;
  rs_idx_t cur_rs;
  logic [ROWSTRIP_WIDTH:0] zeros_left;
  logic [5:0] cnt;

  logic new_rs;
  assign new_rs = have_rs && (head_tag.rowstrip != cur_rs);

  // hold back entries that would use a half still to be emptied
  always_comb begin
    clkout_busy = 1'b0;
    if (head_valid) begin
      unique case (state)
        S_INIT, S_DONE:               clkout_busy = 1'b1;
        S_IDLE:                       clkout_busy = 1'b0;
        S_DRAIN, S_BLK_WAIT, S_STREAM: clkout_busy = new_rs || (head_tag.pbuf == stream_buf);
        default:                      clkout_busy = new_rs;
      endcase
    end
  end

  assign init_busy = (state == S_INIT);
  assign blk_rdy   = (state == S_BLK_WAIT) || (state == SZBLOCK_WAIT);
  assign done      = (state == S_DONE);

  always_comb begin
    so_en    = 1'b0;
    so_buf   = stream_buf;
    so_addr  = cnt[4:0];
    clr_en   = 1'b0;
    clr_mask = stream_buf ? 2'b10 : 2'b01;
    clr_addr = cnt[4:0] - 5'd1;
    out_en   = 1'b0;
    out_zero = 1'b0;
    out_last = 1'b0;
    unique case (state)
      S_INIT: begin
        clr_en   = 1'b1;
        clr_mask = 2'b11;
        clr_addr = cnt[4:0];
      end
      S_STREAM: begin
        so_en    = (cnt < 6'(BUF_DEPTH));
        clr_en   = (cnt != 6'd0);
        out_en   = so_en;
        out_last = (cnt == 6'(BUF_DEPTH - 1));
      end
      SZBLOCK: begin
        out_en   = 1'b1;
        out_zero = 1'b1;
        out_last = (cnt == 6'(BUF_DEPTH - 1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_INIT;
      cnt        <= '0;
      have_rs    <= 1'b0;
      cur_rs     <= '0;
      cur_pbuf   <= 1'b0;
      stream_buf <= 1'b0;
      zeros_left <= '0;
      final_pend <= 1'b0;
      finalizing <= 1'b0;
    end else begin
      if (pop && head_tag.eom) final_pend <= 1'b1;
      unique case (state)
        S_INIT: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(BUF_DEPTH - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (pop && !have_rs) begin
            // first entry: zero blocks for the rowstrips before it
            have_rs    <= 1'b1;
            cur_rs     <= head_tag.rowstrip;
            cur_pbuf   <= head_tag.pbuf;
            zeros_left <= {1'b0, head_tag.rowstrip};
            if (head_tag.rowstrip != '0) state <= SZBLOCK_WAIT;
          end else if (pop && new_rs) begin
            // rowstrip change: emit the old half, then the skipped rowstrips
            stream_buf <= cur_pbuf;
            cur_rs     <= head_tag.rowstrip;
            cur_pbuf   <= head_tag.pbuf;
            zeros_left <= {1'b0, head_tag.rowstrip} - {1'b0, cur_rs} - 1'b1;
            cnt        <= '0;
            state      <= S_DRAIN;
          end else if (final_pend && !finalizing) begin
            // end of matrix: emit the last half, then the trailing rowstrips
            stream_buf <= cur_pbuf;
            zeros_left <= n_rowstrips - {1'b0, cur_rs} - 1'b1;
            finalizing <= 1'b1;
            cnt        <= '0;
            state      <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(DRAIN_CYC - 1)) state <= S_BLK_WAIT;
        end
        S_BLK_WAIT: if (go) begin
          cnt   <= '0;
          state <= S_STREAM;
        end
        S_STREAM: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(BUF_DEPTH)) begin
            cnt <= '0;
            if (zeros_left != '0) state <= SZBLOCK_WAIT;
            else                  state <= finalizing ? S_DONE : S_IDLE;
          end
        end
        SZBLOCK_WAIT: if (go) begin
          cnt   <= '0;
          state <= SZBLOCK;
        end
        SZBLOCK: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(BUF_DEPTH - 1)) begin
            cnt        <= '0;
            zeros_left <= zeros_left - 1'b1;
            if (zeros_left != 1) state <= SZBLOCK_WAIT;
            else                 state <= finalizing ? S_DONE : S_IDLE;
          end
        end
        S_DONE: ;
        default: state <= S_INIT;
      endcase
    end
  end

  // an entry is only taken when the controller lets it through
  a_pop_allowed: assert property (@(posedge clk) disable iff (rst) pop |-> head_valid && !clkout_busy);
  // rowstrips arrive in increasing order
  a_rs_order: assert property (@(posedge clk) disable iff (rst)
    pop && have_rs |-> head_tag.rowstrip >= cur_rs);

endmodule

// psum_storage: ping-pong partial-sum storage of one processing element.
//
// What it does. For the rowstrip in progress each processing element keeps
// one partial sum per row of the 128-row block. Two halves are kept: the
// accumulator reads and updates one half while the other half, holding the
// finished partial sums of the previous rowstrip, is streamed out 4 doubles
// per cycle and cleared to zero behind the read.
//
// How it works. Each half is its own simple-dual-port memory of 32 rows x 4
// doubles (one big 256-entry memory would need more than two ports while a
// stream-out overlaps accumulation). Each half's read port is given either to
// the accumulator or to the stream-out, and its write port either to the
// accumulator (one 64-bit word of a row) or to the clearing logic (a whole row
// of zeros); the control guarantees both never want the same half. The
// accumulator read path is cut in stages as in the document: memory read,
// then two 64-bit 4-to-1 multiplexers (8 candidates down to 2), then one
// 2-to-1 multiplexer. Stream-out data is registered after the memory.
//
// Interface and timing.
//   acc_rd_en/buf/row in cycle t   -> acc_rd_data valid in cycle t+PSUM_RD_LAT (3)
//   acc_wr_en/buf/row/data         -> written at the end of the cycle (read-first:
//                                     a read of the same word in that cycle sees
//                                     the old value)
//   so_en/so_buf/so_addr in cycle t -> so_data (row of 4 words) valid in cycle t+2
//   clr_en/clr_mask/clr_addr       -> the row is zeroed in the selected halves
// A stream-out read and a clear of the same half may be active together (the
// read and write ports are separate). Partial sums are not reset by rst: the
// controller clears both halves after reset.
module psum_storage
  import spmv_pkg::*;
(
  input  logic       clk,
  // accumulator read
  input  logic       acc_rd_en,
  input  logic       acc_rd_buf,
  input  logic [6:0] acc_rd_row,
  output dword_t     acc_rd_data,
  // accumulator write
  input  logic       acc_wr_en,
  input  logic       acc_wr_buf,
  input  logic [6:0] acc_wr_row,
  input  dword_t     acc_wr_data,
  // stream-out read
  input  logic       so_en,
  input  logic       so_buf,
  input  logic [4:0] so_addr,
  output dword_t     so_data [WORDS],
  // clearing
  input  logic       clr_en,
  input  logic [1:0] clr_mask,
  input  logic [4:0] clr_addr
);

  logic [WORDS*64-1:0] mem0 [BUF_DEPTH];
  logic [WORDS*64-1:0] mem1 [BUF_DEPTH];
  logic [WORDS*64-1:0] rdata [2];
  logic [4:0]          raddr [2];
  logic                ren   [2];

  // read port of each half: stream-out has it when it targets that half
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (so_en && so_buf == 1'(b)) begin
        ren[b]   = 1'b1;
        raddr[b] = so_addr;
      end else begin
        ren[b]   = acc_rd_en && acc_rd_buf == 1'(b);
        raddr[b] = acc_rd_row[6:2];
      end
    end
  end

  // write port of each half: one word for the accumulator or a zero row
  logic [WORDS*64-1:0] wmask [2];
  logic [WORDS*64-1:0] wdata [2];
  logic [4:0]          waddr [2];
  logic                wen   [2];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (clr_en && clr_mask[b]) begin
        wen[b]   = 1'b1;
        waddr[b] = clr_addr;
        wmask[b] = '1;
        wdata[b] = '0;
      end else begin
        wen[b]   = acc_wr_en && acc_wr_buf == 1'(b);
        waddr[b] = acc_wr_row[6:2];
        wmask[b] = {{(WORDS-1)*64{1'b0}}, {64{1'b1}}} << (acc_wr_row[1:0] * 64);
        wdata[b] = {WORDS{acc_wr_data}};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ren[0]) rdata[0] <= mem0[raddr[0]];
    if (ren[1]) rdata[1] <= mem1[raddr[1]];
    if (wen[0]) mem0[waddr[0]] <= (mem0[waddr[0]] & ~wmask[0]) | (wdata[0] & wmask[0]);
    if (wen[1]) mem1[waddr[1]] <= (mem1[waddr[1]] & ~wmask[1]) | (wdata[1] & wmask[1]);
  end

  // accumulator path: memory -> 2 x (4-to-1) -> 2-to-1
  logic [1:0] sel_q [2];
  logic       buf_q [2];
  dword_t     mux4_q [2];

  always_ff @(posedge clk) begin
    sel_q[0] <= acc_rd_row[1:0];
    buf_q[0] <= acc_rd_buf;
    sel_q[1] <= sel_q[0];
    buf_q[1] <= buf_q[0];
    for (int b = 0; b < 2; b++) mux4_q[b] <= rdata[b][sel_q[0]*64 +: 64];
    acc_rd_data <= mux4_q[buf_q[1]];
  end

  // stream-out path: memory -> output register
  logic so_buf_q;
  always_ff @(posedge clk) begin
    so_buf_q <= so_buf;
    for (int w = 0; w < WORDS; w++) so_data[w] <= rdata[so_buf_q][w*64 +: 64];
  end

endmodule

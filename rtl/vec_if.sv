// vec_if: vector interface of the bus-attached processing element.
//
// What it does. A 128-element vector block arrives from the 32-bit system bus
// as 256 words in a memory space; the processing element takes it as 32 beats
// of 4 doubles. The memory is organised as 32 rows of 8 words (one row = one
// beat), so bus word a lands in row a[7:3], position a[2:0]; double w of a beat
// is {word 2w+1, word 2w}, low half first. When software reports the memory
// full (fill_done), the machine reads the rows in order and offers each as a
// beat (xvalid) until the element takes it (xdata_ack), marking the 32nd with
// xeod. After the last beat the memory is empty again, which raises req so the
// software-coordination machine asks for the next block.
//
// Interface and timing. bus_we/bus_addr/bus_wdata: 32-bit writes from the bus
// side. fill_done: one-cycle pulse, the memory has been filled. req: memory
// empty and sending finished. enable: software has finished initialising the
// data. A beat is taken in a cycle with xvalid && xdata_ack; the next beat is
// offered in the following cycle (one beat per cycle). Following the
// document: 256 words, 32 beats of 4 doubles, the "memory empty" request.
// This design's own: the row-of-8-words memory shape and the word order.
module vec_if
  import spmv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  input  logic        fill_done,
  output logic        req,
  output logic        xvalid,
  input  logic        xdata_ack,
  output logic        xeod,
  output dword_t      xin [WORDS]
);

  typedef enum logic [1:0] { S_EMPTY, S_LOAD, S_SEND } state_t;
  state_t state;

  logic [255:0] mem [BUF_DEPTH];
  logic [255:0] row_q;
  logic [4:0]   beat, rd_row;
  logic         take;

  always_ff @(posedge clk)
    if (bus_we) mem[bus_addr[7:3]][32*bus_addr[2:0] +: 32] <= bus_wdata;

  assign take   = (state == S_SEND) && xdata_ack;
  assign rd_row = take ? beat + 5'd1 : beat;

  always_ff @(posedge clk) row_q <= mem[rd_row];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_EMPTY;
      beat  <= '0;
    end else begin
      unique case (state)
        S_EMPTY: if (fill_done) begin state <= S_LOAD; beat <= '0; end
        S_LOAD:  state <= S_SEND;
        S_SEND:  if (xdata_ack) begin
          beat <= beat + 5'd1;
          if (beat == 5'(BUF_DEPTH - 1)) state <= S_EMPTY;
        end
        default: state <= S_EMPTY;
      endcase
    end
  end

  assign req    = enable && (state == S_EMPTY);
  assign xvalid = (state == S_SEND);
  assign xeod   = (state == S_SEND) && (beat == 5'(BUF_DEPTH - 1));
  always_comb
    for (int w = 0; w < WORDS; w++) xin[w] = row_q[64*w +: 64];

endmodule

// mat_if: matrix interface of the bus-attached processing element.
//
// What it does. Matrix entries arrive from the 32-bit system bus in a memory
// space of 256 words. An entry is 96 bits, i.e. three words at successive
// addresses (lowest address = bits 31:0), so one fill carries 85 entries.
// When software reports the memory full (fill_done), the machine reads three
// words, assembles the entry and offers it to the processing element (avalid)
// until it is taken (aack), then goes on with the next. After 85 entries, or
// after the entry that carries the end-of-matrix flag, the memory is empty.
// After end of matrix no further fill is requested until reset.
//
// Interface and timing. bus_we/bus_addr/bus_wdata: 32-bit writes. fill_done:
// one-cycle pulse. req: memory empty and more entries expected. An entry
// takes 4 cycles to assemble (registered memory read) plus the handshake, so
// the interface delivers one entry per 5 cycles at best. Following the
// document: 96-bit entries built from three 32-bit words, 85 per fill, the
// "memory empty" request. This design's own: word order, the stop at end of
// matrix.
module mat_if
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
  output logic        avalid,
  input  logic        aack,
  output mat_entry_t  adata
);

  localparam int ENTRIES = 256 / 3;   // 85 entries per fill

  typedef enum logic [1:0] { S_EMPTY, S_READ, S_SEND, S_FIN } state_t;
  state_t state;

  logic [31:0] mem [256];
  logic [31:0] rdata_q;
  logic [31:0] ent [3];
  logic [7:0]  ptr;
  logic [1:0]  ph;
  logic [6:0]  n_sent;

  always_ff @(posedge clk)
    if (bus_we) mem[bus_addr] <= bus_wdata;

  always_ff @(posedge clk) rdata_q <= mem[ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_EMPTY;
      ptr    <= '0;
      ph     <= '0;
      n_sent <= '0;
    end else begin
      unique case (state)
        S_EMPTY: if (fill_done) begin
          state  <= S_READ;
          ptr    <= '0;
          ph     <= '0;
          n_sent <= '0;
        end
        S_READ: begin
          if (ph != 2'd3) ptr <= ptr + 8'd1;
          if (ph != 2'd0) ent[ph - 2'd1] <= rdata_q;
          ph <= ph + 2'd1;
          if (ph == 2'd3) state <= S_SEND;
        end
        S_SEND: if (aack) begin
          n_sent <= n_sent + 7'd1;
          if (adata.eom) state <= S_FIN;
          else if (n_sent == 7'(ENTRIES - 1)) state <= S_EMPTY;
          else state <= S_READ;
        end
        S_FIN: ;
        default: state <= S_EMPTY;
      endcase
    end
  end

  assign req    = enable && (state == S_EMPTY);
  assign avalid = (state == S_SEND);
  assign adata  = mat_entry_t'({ent[2], ent[1], ent[0]});

endmodule

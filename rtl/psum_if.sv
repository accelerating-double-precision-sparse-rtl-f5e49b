// psum_if: partial-sum (result) interface of the bus-attached processing
// element.
//
// What it does. At the end of each rowstrip the processing element emits 128
// doubles as 32 rows of 4 in consecutive cycles. This interface stores each
// row as eight 32-bit words at successive addresses (row r, double w: words
// 8r+2w (low half) and 8r+2w+1), so software reads the block from a 256-word
// memory space. The block is released to the element only while the memory
// is free: go is given when the element is ready (blk_rdy), the memory is
// empty and no block is on its way. After the last row the memory is full,
// which raises req; when software reports it read (drain_done) the memory is
// free again.
//
// Interface and timing. blk_rdy/go: the element's block handshake, go is
// combinational from blk_rdy. pvalid/pdata/plast: rows from the element, one
// per cycle, written in the cycle they arrive. bus_addr/bus_rdata: 32-bit
// reads, data one cycle after the address. Following the document: eight
// 32-bit chunks per row at successive locations, 256-word memory, the
// "complete block ready" request. This design's own: the memory keeps rows
// of 8 words so a whole row is written per cycle, and the go gating.
module psum_if
  import spmv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  bus_addr,
  output logic [31:0] bus_rdata,
  input  logic        drain_done,
  output logic        req,
  input  logic        blk_rdy,
  output logic        go,
  input  logic        pvalid,
  input  dword_t      pdata [WORDS],
  input  logic        plast
);

  logic [255:0] mem [BUF_DEPTH];
  logic [4:0]   wrow;
  logic         full, pending;
  logic [255:0] rrow;

  assign go  = blk_rdy && !full && !pending;
  assign req = full;

  always_ff @(posedge clk) begin
    if (rst) begin
      full    <= 1'b0;
      pending <= 1'b0;
      wrow    <= '0;
    end else begin
      if (go) pending <= 1'b1;
      if (pvalid) begin
        wrow <= plast ? 5'd0 : wrow + 5'd1;
        if (plast) begin
          pending <= 1'b0;
          full    <= 1'b1;
        end
      end
      if (drain_done) full <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (pvalid)
      mem[wrow] <= {pdata[3], pdata[2], pdata[1], pdata[0]};

  assign rrow = mem[bus_addr[7:3]];
  always_ff @(posedge clk) bus_rdata <= rrow[32*bus_addr[2:0] +: 32];

  a_no_overwrite: assert property (@(posedge clk) disable iff (rst)
    pvalid |-> pending);

endmodule

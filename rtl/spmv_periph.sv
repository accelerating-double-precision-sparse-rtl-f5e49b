// spmv_periph: one processing element packaged as a slave peripheral of a
// 32-bit processor bus, for a small embedded system in which a soft processor
// and a DMA engine move all data between DRAM and the element.
//
// What it does. The element sees its usual three streams (matrix entries,
// vector blocks, result blocks). Each stream is served by an interface
// (mat_if, vec_if, psum_if) that converts between the element's wide words and
// a 256-word memory space on the bus, and by an xfer_sync_fsm that raises an
// interrupt when the memory space needs a transfer and follows the software's
// acknowledge/done handshake. The three interrupts are ORed into irq.
//
// Bus side (the user side of a slave bus interface). One access per cycle:
// bus_space selects 0 = registers, 1 = vector memory, 2 = matrix memory,
// 3 = result memory; bus_addr is the word address in it; bus_we writes
// bus_wdata; bus_rdata returns the addressed word one cycle later.
// Registers (bus_addr[1:0]):
//   0 interrupt status, read only: bit 0 vector, 1 matrix, 2 result,
//     3 element done (all result blocks have been read out).
//   1 software state, read/write: bit 0 vector ack, 1 vector done, 2 matrix
//     ack, 3 matrix done, 4 result ack, 5 result done, 8 data initialised
//     (starts the vector and matrix requests), 9 element reset (for the next
//     iteration), bits 30:16 number of rowstrips.
//   2 debug, read only: bits 7:0 vector blocks, 15:8 matrix fills, 23:16
//     result blocks transferred; bits 26:24 busy flags of the three
//     coordination machines.
// Following the document: three memory spaces of 256 words, three level
// interrupts unified into one, a status, a software-state and a debug
// register, and the per-interface ack/done bits. This design's own: the bit
// positions, the bus signal set and the debug contents. The element used is
// the two-pipeline one of this design.
module spmv_periph
  import spmv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  bus_space,
  input  logic [7:0]  bus_addr,
  input  logic        bus_we,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        irq
);

  logic [31:0] sw_reg;
  logic [7:0]  n_vec, n_mat, n_ps;
  logic        pe_rst, enable;

  // element streams
  logic       avalid, aack, xvalid, xack, xeod, blk_rdy, go, pvalid, plast, pe_done;
  mat_entry_t adata;
  dword_t     xin [WORDS];
  dword_t     pdata [WORDS];

  // coordination
  logic vreq, mreq, preq, virq, mirq, pirq, vbusy, mbusy, pbusy, vfill, mfill, pdrain;
  logic [31:0] ps_rdata;
  logic [1:0]  space_q;
  logic [31:0] reg_q;

  assign pe_rst = rst || sw_reg[9];
  assign enable = sw_reg[8];

  always_ff @(posedge clk) begin
    if (rst) sw_reg <= '0;
    else if (bus_we && bus_space == 2'd0 && bus_addr[1:0] == 2'd1) sw_reg <= bus_wdata;
  end

  always_ff @(posedge clk) begin
    if (pe_rst) begin
      n_vec <= '0;
      n_mat <= '0;
      n_ps  <= '0;
    end else begin
      n_vec <= n_vec + 8'(vfill);
      n_mat <= n_mat + 8'(mfill);
      n_ps  <= n_ps + 8'(pdrain);
    end
  end

  vec_if u_vec (
    .clk, .rst(pe_rst), .enable,
    .bus_we(bus_we && bus_space == 2'd1), .bus_addr, .bus_wdata,
    .fill_done(vfill), .req(vreq),
    .xvalid, .xdata_ack(xack), .xeod, .xin
  );

  mat_if u_mat (
    .clk, .rst(pe_rst), .enable,
    .bus_we(bus_we && bus_space == 2'd2), .bus_addr, .bus_wdata,
    .fill_done(mfill), .req(mreq),
    .avalid, .aack, .adata
  );

  psum_if u_ps (
    .clk, .rst(pe_rst), .bus_addr, .bus_rdata(ps_rdata),
    .drain_done(pdrain), .req(preq),
    .blk_rdy, .go, .pvalid, .pdata, .plast
  );

  xfer_sync_fsm u_vsync (.clk, .rst(pe_rst), .req(vreq), .sw_ack(sw_reg[0]),
    .sw_done(sw_reg[1]), .irq(virq), .busy(vbusy), .xfer_done(vfill));
  xfer_sync_fsm u_msync (.clk, .rst(pe_rst), .req(mreq), .sw_ack(sw_reg[2]),
    .sw_done(sw_reg[3]), .irq(mirq), .busy(mbusy), .xfer_done(mfill));
  xfer_sync_fsm u_psync (.clk, .rst(pe_rst), .req(preq), .sw_ack(sw_reg[4]),
    .sw_done(sw_reg[5]), .irq(pirq), .busy(pbusy), .xfer_done(pdrain));

  spmv_pe u_pe (
    .clk, .rst(pe_rst), .n_rowstrips(sw_reg[16 +: ROWSTRIP_WIDTH + 1]),
    .avalid, .adata, .aack,
    .xvalid, .xdata_ack(xack), .xeod, .xin,
    .blk_rdy, .go, .pvalid, .pdata, .plast, .done(pe_done)
  );

  assign irq = virq || mirq || pirq;

  // registered register read; result memory read is registered inside psum_if
  always_ff @(posedge clk) begin
    space_q <= bus_space;
    unique case (bus_addr[1:0])
      2'd0:    reg_q <= {28'd0, pe_done && !preq, pirq, mirq, virq};
      2'd1:    reg_q <= sw_reg;
      2'd2:    reg_q <= {5'd0, pbusy, mbusy, vbusy, n_ps, n_mat, n_vec};
      default: reg_q <= '0;
    endcase
  end

  assign bus_rdata = (space_q == 2'd3) ? ps_rdata :
                     (space_q == 2'd0) ? reg_q : 32'd0;

endmodule

// xfer_sync_fsm: co-ordinates one data interface of the bus-attached
// processing element with the software that moves its data by DMA.
//
// What it does. While the interface asks for a transfer (req: its memory space
// is empty, or holds a finished result block), the machine raises a level
// interrupt. When software sets the interface's acknowledge bit, the
// interrupt is masked and the machine waits for the transfer-done bit. Done
// counts only once acknowledge has been cleared again, so a done bit left
// over from the previous transfer is never mistaken for the current one.
// Then xfer_done pulses for one cycle, telling the interface that the memory
// space has been filled (or emptied), and the machine returns to idle.
//
// Interface and timing. req is a level from the interface; it must drop in
// the cycle after xfer_done. sw_ack/sw_done are bits of a software register.
// irq is registered state (S_REQ). busy is high from the interrupt until the
// end of the transfer. The three states and the ack/done protocol follow the
// document; treating "done while ack is still set" as not yet done is this
// design's reading of the order in which software clears and sets the bits.
module xfer_sync_fsm (
  input  logic clk,
  input  logic rst,
  input  logic req,
  input  logic sw_ack,
  input  logic sw_done,
  output logic irq,
  output logic busy,
  output logic xfer_done
);

  typedef enum logic [1:0] { S_IDLE, S_REQ, S_XFER } state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE: if (req) state <= S_REQ;
        S_REQ:  if (sw_ack) state <= S_XFER;
        S_XFER: if (sw_done && !sw_ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign irq       = (state == S_REQ);
  assign busy      = (state != S_IDLE);
  assign xfer_done = (state == S_XFER) && sw_done && !sw_ack;

endmodule

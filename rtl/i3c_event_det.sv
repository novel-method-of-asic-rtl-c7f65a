// i3c_event_det: the event detector, source of the controller's interrupt.
//
// Event pulses from the rest of the controller (command finished, target
// NACK, in-band interrupt received or rejected, buffer overflow, dynamic
// address assignment finished) are caught in sticky pending bits. The
// interrupt line `irq` is high while any pending bit is also enabled in
// int_en. The CPU clears bits by writing ones (clr, one clock pulse per bit),
// through the APB register block. A bit that is set and cleared in the same
// clock stays set, so no event is lost. The event list is this design's
// reading of "incoming IBI request, buffer overflow, communication errors".
module i3c_event_det
  import i3c_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_EVENTS-1:0] ev,        // event pulses
  input  logic [N_EVENTS-1:0] int_en,    // enable mask
  input  logic [N_EVENTS-1:0] clr,       // write-1-to-clear
  output logic [N_EVENTS-1:0] pending,
  output logic                irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= (pending & ~clr) | ev;
  end

  assign irq = |(pending & int_en);

endmodule

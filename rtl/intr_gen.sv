// intr_gen: interrupt generation circuit of the reconfigurable DSP unit.
//
// Any change in the value of the partial evaluation register raises a
// reconfiguration request interrupt. The generator keeps a copy of the value
// it saw last; when the register differs from that copy, irq is set and the
// copy updated. irq is a level that stays high until the interrupt handler
// (here the reconfiguration controller) pulses ack.
//
// Timing: irq rises one cycle after the register changes. A change in the
// same cycle as ack wins: irq stays high, so a change made while a
// reconfiguration is in progress is never lost. Several changes before an
// ack merge into one request; the handler reads the register's latest value.
// Reset (active-low, synchronous) loads the copy with the register's reset
// value and clears irq. The level-type interrupt and the ack handshake are
// this design's choices.
module intr_gen
  import rtr_pkg::*;
#(
  parameter sel_t RESET_VAL = SEL_FIR
) (
  input  logic clk,
  input  logic rst_n,
  input  sel_t value,
  input  logic ack,
  output logic irq
);

  sel_t seen;
  logic change;

  assign change = (value != seen);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seen <= RESET_VAL;
      irq  <= 1'b0;
    end else begin
      seen <= value;
      if (change)   irq <= 1'b1;
      else if (ack) irq <= 1'b0;
    end
  end

endmodule

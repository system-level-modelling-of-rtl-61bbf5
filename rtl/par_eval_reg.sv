// par_eval_reg: the partial evaluation register of the reconfigurable DSP unit.
//
// Holds the partial evaluation parameter `sel`, which decides the candidate
// configured into the reconfiguration region. The static part of the design
// writes it (we high for one cycle loads d); the reconfiguration controller
// reads it (q) when it serves a reconfiguration request, and the interrupt
// generator watches it for changes.
//
// This design's choices: a write strobe rather than sampling `sel` every
// cycle, an active-low synchronous reset, and a reset value equal to the
// candidate that the initial full configuration places in the region
// (filterFIR, sel = 1), so that reset does not by itself demand a
// reconfiguration. q is registered: a write is visible one cycle later.
module par_eval_reg
  import rtr_pkg::*;
#(
  parameter sel_t RESET_VAL = SEL_FIR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  sel_t d,
  output sel_t q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VAL;
    else if (we) q <= d;
  end

endmodule

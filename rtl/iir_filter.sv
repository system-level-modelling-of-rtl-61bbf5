// iir_filter: filterIIR, the recursive candidate of the reconfigurable DSP unit.
//
// A recursive filter with constant coefficients d0..d2 whose delay line
// reg0..reg2 holds past outputs:
//   y = x + d0*reg0 + d1*reg1 + d2*reg2
// On every accepted sample (in_valid) the output is shifted into the delay
// line: reg0 <= y, reg1 <= reg0, reg2 <= reg1. The structure follows the
// filter's block diagram and its functional description (a fold of the
// coefficient/register products with x as the start value, the result shifted
// into the registers).
//
// Written as a Mealy machine: y is combinational in x and the registers; the
// registers change on the clock edge that accepts the sample.
//
// This design's choices: 16-bit two's-complement samples and coefficients,
// exact products and sums truncated to the sample width (wrapping
// arithmetic, so the feedback can never overflow a register). Coefficient
// values are not given for the unit; the defaults 1, -1, 1 are placeholders.
// `clear` zeroes the delay line synchronously; rst_n is an active-low
// synchronous reset.
module iir_filter
  import rtr_pkg::*;
#(
  parameter int unsigned ORDER = 3,
  parameter sample_t     COEF [ORDER] = '{16'sd1, -16'sd1, 16'sd1}
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  input  sample_t x,
  output sample_t y
);

  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(ORDER + 1) + 1;
  typedef logic signed [ACC_W-1:0] acc_t;

  sample_t regs [ORDER];

  acc_t acc;
  always_comb begin
    acc = acc_t'(x);
    for (int i = 0; i < ORDER; i++) acc += acc_t'(COEF[i]) * acc_t'(regs[i]);
  end
  assign y = acc[DATA_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < ORDER; i++) regs[i] <= '0;
    end else if (in_valid) begin
      regs[0] <= y;
      for (int i = 1; i < ORDER; i++) regs[i] <= regs[i-1];
    end
  end

endmodule

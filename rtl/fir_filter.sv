// fir_filter: filterFIR, the FIR candidate of the reconfigurable DSP unit.
//
// A direct-form FIR filter with constant coefficients d0..d3 and a delay
// line reg0..reg2:
//   y = d0*x + d1*reg0 + d2*reg1 + d3*reg2
// On every accepted sample (in_valid) the delay line shifts: reg0 <= x,
// reg1 <= reg0, reg2 <= reg1. The structure (4 coefficients, 3 delay
// registers, x weighted by d0) follows the filter's block diagram.
//
// The filter is written as a Mealy machine: y is combinational in x and the
// delay registers, and the registers change on the clock edge that accepts
// the sample. So y for a sample is valid in the same cycle as the sample.
//
// This design's choices: 16-bit two's-complement samples and coefficients
// (rtr_pkg::sample_t); products and sums are formed exactly and the result is
// truncated to the sample width, so arithmetic wraps like fixed-width signed
// integers. The coefficient values are not given for the unit; the defaults
// 1, 2, 3, 4 are placeholders. `clear` zeroes the delay line synchronously
// (used when the filter is freshly configured into a region); rst_n is an
// active-low synchronous reset.
module fir_filter
  import rtr_pkg::*;
#(
  parameter int unsigned TAPS = 4,
  parameter sample_t     COEF [TAPS] = '{16'sd1, 16'sd2, 16'sd3, 16'sd4}
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  input  sample_t x,
  output sample_t y
);

  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(TAPS) + 1;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Delay line: taps[0] is the current input, taps[i] is reg(i-1).
  sample_t regs [TAPS-1];
  sample_t taps [TAPS];

  always_comb begin
    taps[0] = x;
    for (int i = 1; i < TAPS; i++) taps[i] = regs[i-1];
  end

  acc_t acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc += acc_t'(COEF[i]) * acc_t'(taps[i]);
  end
  assign y = acc[DATA_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < TAPS - 1; i++) regs[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < TAPS - 1; i++) regs[i] <= taps[i];
    end
  end

endmodule

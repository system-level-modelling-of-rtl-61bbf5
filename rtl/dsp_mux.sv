// dsp_mux: simulation model of the reconfigurable DSP unit.
//
// Both candidate filters are built side by side on the same input, and a
// multiplexer driven by the partial evaluation parameter `sel` picks the
// output: sel = 0 selects filterIIR, sel = 1 selects filterFIR. Any other
// value selects no candidate: out_valid stays low and dataout is zero (the
// unit's description defines only the values 0 and 1).
//
// Both filters accept every sample, so each keeps its own history while the
// other is selected. In the implementation model only the selected filter
// exists (it is configured into a reconfiguration region); the region model
// reconfig_region reuses this module with `sel` tied to the configured
// candidate and clears the history on each reconfiguration.
//
// Timing: combinational from datain/sel to dataout (Mealy outputs of the
// filters); filter state advances on clock edges with in_valid high.
module dsp_mux
  import rtr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  sel_t    sel,
  input  logic    in_valid,
  input  sample_t datain,
  output logic    out_valid,
  output sample_t dataout
);

  sample_t y_iir, y_fir;

  iir_filter u_filter_iir (
    .clk, .rst_n, .clear, .in_valid, .x(datain), .y(y_iir)
  );

  fir_filter u_filter_fir (
    .clk, .rst_n, .clear, .in_valid, .x(datain), .y(y_fir)
  );

  always_comb begin
    unique case (sel)
      SEL_IIR: begin dataout = y_iir; out_valid = in_valid; end
      SEL_FIR: begin dataout = y_fir; out_valid = in_valid; end
      default: begin dataout = '0;    out_valid = 1'b0;     end
    endcase
  end

endmodule

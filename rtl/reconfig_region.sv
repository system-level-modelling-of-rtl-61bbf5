// reconfig_region: behavioural model of reconfiguration region RR1, with its
// bus macros and configuration port, holding one candidate filter at a time.
//
// This is a model of FPGA fabric, not logic to be synthesized as such: on a
// real device the region is a block of 3 CLB columns whose function is
// whatever partial bitstream was last written into its 48 configuration
// frames. The model takes the candidate number from the bitstream's header
// word and then behaves as that candidate: it instantiates the simulation
// model dsp_mux and drives its select with the configured candidate, which
// is the multiplexer partially evaluated for one value of sel.
//
// Configuration port (cfg_en, cfg_data), one 32-bit word per cycle with
// cfg_en high. A bitstream is a header word {CFG_TAG, id} and PBS_LEN frame
// words. When the header arrives the region stops working (the old logic is
// being overwritten): cfg_busy rises, samples are not accepted, out_valid is
// low. After the last frame word the region holds candidate `id` with its
// delay line cleared, as freshly configured flip-flops are. An id with no
// candidate leaves the region unconfigured. A word outside a bitstream
// without the header tag sets the sticky cfg_err. cfg_signature is a
// rotate-and-xor over the frame words of the last bitstream, so a test can
// see that the words arrived complete and in order.
//
// Data side (through the bus macros, which are fixed wiring): datain and
// in_valid in, dataout and out_valid out, combinational through the active
// filter. After reset the region holds filterFIR, the candidate in the
// initial configuration. Header format, signature and the word-count rule
// are this model's choices.
module reconfig_region
  import rtr_pkg::*;
#(
  parameter sel_t        INIT_ID = SEL_FIR,
  parameter int unsigned PBS_LEN = PBS_WORDS
) (
  input  logic      clk,
  input  logic      rst_n,
  // configuration port
  input  logic      cfg_en,
  input  cfg_word_t cfg_data,
  output logic      cfg_busy,
  output logic      cfg_err,
  output cfg_word_t cfg_signature,
  output logic      configured,
  output sel_t      active_id,
  // data path through the bus macros
  input  logic      in_valid,
  input  sample_t   datain,
  output logic      out_valid,
  output sample_t   dataout
);

  localparam int unsigned CNT_W = $clog2(PBS_LEN + 1);
  logic [CNT_W-1:0] cnt;
  sel_t             pend_id;
  logic             running;
  logic             mux_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_busy      <= 1'b0;
      cfg_err       <= 1'b0;
      cfg_signature <= '0;
      configured    <= 1'b1;
      active_id     <= INIT_ID;
      pend_id       <= INIT_ID;
      cnt           <= '0;
    end else if (cfg_en) begin
      if (!cfg_busy) begin
        if (cfg_data[CFG_W-1:SEL_W] == CFG_TAG) begin
          cfg_busy      <= 1'b1;
          configured    <= 1'b0;
          pend_id       <= cfg_data[SEL_W-1:0];
          cfg_signature <= '0;
          cnt           <= '0;
        end else begin
          cfg_err <= 1'b1;
        end
      end else begin
        cfg_signature <= {cfg_signature[CFG_W-2:0], cfg_signature[CFG_W-1]} ^ cfg_data;
        cnt           <= cnt + 1'b1;
        if (32'(cnt) == PBS_LEN - 1) begin
          cfg_busy   <= 1'b0;
          active_id  <= pend_id;
          configured <= (32'(pend_id) < NUM_CANDIDATES);
        end
      end
    end
  end

  assign running = configured && !cfg_busy;

  dsp_mux u_candidate (
    .clk,
    .rst_n,
    .clear    (cfg_busy),
    .sel      (active_id),
    .in_valid (in_valid && running),
    .datain,
    .out_valid(mux_valid),
    .dataout
  );

  assign out_valid = mux_valid && running;

endmodule

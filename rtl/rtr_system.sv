// rtr_system: self-reconfiguring DSP unit with one reconfiguration region.
//
// The unit filters a sample stream with either a recursive filter
// (filterIIR) or an FIR filter (filterFIR), but only one of them exists in
// the fabric at a time: it sits in reconfiguration region RR1 and is swapped
// by rewriting the region's partial bitstream while the system runs.
//
//   sel ──> par_eval_reg ──> intr_gen ──irq──> reconfig_ctrl
//                 │                               │   │
//                 └──────── pe_value ─────────────┘   │ reads
//                                        bitstream_store (one partial
//                                                       bitstream per candidate)
//                                                     │ cfg words
//   datain ──> [bus macro] reconfig_region (RR1) [bus macro] ──> dataout
//
// Writing a new value into the partial evaluation register (sel_we, sel)
// makes intr_gen raise a request; reconfig_ctrl reads the register, copies
// that candidate's partial bitstream from the store into the region, and
// returns to waiting. While the region is being rewritten it accepts no
// samples (out_valid low for every in_valid); afterwards it runs the new
// filter from a cleared history. sel = 0 selects filterIIR, 1 filterFIR;
// other values are ignored. After reset the region holds filterFIR.
//
// The partial bitstreams are not part of the RTL: they are loaded through
// the store's write port (bs_we, bs_waddr, bs_wdata) before use. Candidate c
// lives at word c*BS_WORDS: a header {CFG_TAG, c} and 1968 frame words.
//
// In the unit as first built, the reconfiguration state machine is software
// on an embedded processor reached over a system bus; this design replaces
// that with the hardware controller reconfig_ctrl and point-to-point wiring.
// irq, reconfig_busy and the region status are brought out for observation.
// A reconfiguration takes BS_WORDS + 5 cycles from the write of sel to done.
//
// Beside the DSP unit, and unconnected to it, stands the one-bit full adder
// (full_adder, two half adders) that serves as the example of a stateless
// circuit; its pins are the fa_* ports.
module rtr_system
  import rtr_pkg::*;
#(
  parameter int unsigned NUM_CAND = NUM_CANDIDATES,
  parameter int unsigned BS_LEN   = BS_WORDS,
  parameter int unsigned ADDR_W   = $clog2(NUM_CAND * BS_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  // partial evaluation parameter
  input  logic              sel_we,
  input  sel_t              sel,
  // bitstream store loading
  input  logic              bs_we,
  input  logic [ADDR_W-1:0] bs_waddr,
  input  cfg_word_t         bs_wdata,
  // sample stream
  input  logic              in_valid,
  input  sample_t           datain,
  output logic              out_valid,
  output sample_t           dataout,
  // status
  output sel_t              pe_value,
  output logic              irq,
  output logic              reconfig_busy,
  output logic              reconfig_done,
  output logic              reconfig_skipped,
  output logic              region_configured,
  output sel_t              region_id,
  output logic              region_cfg_err,
  output cfg_word_t         region_signature,
  // stand-alone full adder
  input  logic              fa_carry_in,
  input  logic              fa_a,
  input  logic              fa_b,
  output logic              fa_sum,
  output logic              fa_carry_out
);

  logic              ack;
  logic              rd_en;
  logic [ADDR_W-1:0] rd_addr;
  cfg_word_t         rd_data;
  logic              cfg_en;
  cfg_word_t         cfg_data;
  logic              region_busy;
  sel_t              last_id;

  par_eval_reg #(.RESET_VAL(SEL_FIR)) u_pe_reg (
    .clk, .rst_n, .we(sel_we), .d(sel), .q(pe_value)
  );

  intr_gen #(.RESET_VAL(SEL_FIR)) u_intr_gen (
    .clk, .rst_n, .value(pe_value), .ack, .irq
  );

  reconfig_ctrl #(.NUM_CAND(NUM_CAND), .BS_LEN(BS_LEN), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n,
    .irq, .ack,
    .pe_value,
    .rd_en, .rd_addr, .rd_data,
    .cfg_en, .cfg_data,
    .busy(reconfig_busy), .done(reconfig_done), .skipped(reconfig_skipped),
    .last_id
  );

  bitstream_store #(.WORDS(NUM_CAND * BS_LEN), .ADDR_W(ADDR_W)) u_store (
    .clk,
    .we(bs_we), .waddr(bs_waddr), .wdata(bs_wdata),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_data)
  );

  reconfig_region #(.INIT_ID(SEL_FIR), .PBS_LEN(BS_LEN - 1)) u_rr1 (
    .clk, .rst_n,
    .cfg_en, .cfg_data,
    .cfg_busy(region_busy), .cfg_err(region_cfg_err),
    .cfg_signature(region_signature),
    .configured(region_configured), .active_id(region_id),
    .in_valid, .datain,
    .out_valid, .dataout
  );

  full_adder u_full_adder (
    .carry_in(fa_carry_in), .a(fa_a), .b(fa_b), .sum(fa_sum), .carry_out(fa_carry_out)
  );

  // After a completed load the region holds the candidate the controller
  // loaded, and it is never left half-written once the controller is idle.
  a_region_matches_ctrl: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(reconfig_busy) && !$past(reconfig_skipped) |-> region_id == last_id);
  a_region_idle_with_ctrl: assert property (@(posedge clk) disable iff (!rst_n)
    !reconfig_busy |-> !region_busy);

endmodule

// reconfig_ctrl: reconfiguration state machine of the DSP unit.
//
// Two states at heart, as in the unit's reconfiguration flow: a wait state
// that waits for a reconfiguration request, and a reconfiguration state that
// reads the partial evaluation register, reads the corresponding partial
// bitstream and writes it into the reconfiguration region through the
// configuration port. Here the reconfiguration state is split into the steps
// it performs:
//   WAIT     wait for irq; acknowledge it (ack is high in this cycle)
//   READ_REG latch the partial evaluation register; a value with no
//            candidate (>= NUM_CAND) is ignored and the FSM goes to DONE
//   LOAD     read the candidate's BS_LEN words from the bitstream store,
//            one per cycle
//   DRAIN    the last word read is written
//   DONE     one-cycle `done` pulse (reconfiguration done), back to WAIT
//
// In the unit as first built this state machine is software on the embedded
// processor, using the operating system's configuration-port driver. Here it
// is hardware so that the unit is complete without a processor; that is this
// design's choice, as are the state encoding and the cycle-level timing.
//
// Timing: with irq seen in WAIT at cycle T, the configuration words go out
// at cycles T+3 .. T+2+BS_LEN (cfg_en high, one word per cycle, in address
// order), done pulses at T+3+BS_LEN and the FSM is back in WAIT at
// T+4+BS_LEN. The store must have a one-cycle synchronous read, and
// cfg_data is the store's read data passed straight through: the word is
// already registered in the store, so cfg_en is delayed one cycle to line up
// with it instead of registering the data a second time.
module reconfig_ctrl
  import rtr_pkg::*;
#(
  parameter int unsigned NUM_CAND = NUM_CANDIDATES,
  parameter int unsigned BS_LEN   = BS_WORDS,
  parameter int unsigned ADDR_W   = $clog2(NUM_CAND * BS_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  // interrupt from the interrupt generator
  input  logic              irq,
  output logic              ack,
  // partial evaluation register
  input  sel_t              pe_value,
  // bitstream store read port
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  cfg_word_t         rd_data,
  // configuration port of the reconfiguration region
  output logic              cfg_en,
  output cfg_word_t         cfg_data,
  // status
  output logic              busy,
  output logic              done,
  output logic              skipped,
  output sel_t              last_id
);

  typedef enum logic [2:0] {WAIT, READ_REG, LOAD, DRAIN, DONE} state_t;
  state_t state;

  localparam int unsigned CNT_W = $clog2(BS_LEN + 1);
  logic [CNT_W-1:0]  cnt;
  logic [ADDR_W-1:0] base;
  logic              bad_id;

  assign ack      = (state == WAIT) && irq;
  assign rd_en    = (state == LOAD);
  assign rd_addr  = base + ADDR_W'(cnt);
  assign cfg_data = rd_data;
  assign busy     = (state != WAIT);
  assign done     = (state == DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= WAIT;
      cnt     <= '0;
      base    <= '0;
      cfg_en  <= 1'b0;
      bad_id  <= 1'b0;
      last_id <= SEL_FIR;
    end else begin
      cfg_en <= rd_en;
      unique case (state)
        WAIT: if (irq) state <= READ_REG;
        READ_REG: begin
          cnt    <= '0;
          bad_id <= (32'(pe_value) >= NUM_CAND);
          if (32'(pe_value) >= NUM_CAND) begin
            state <= DONE;
          end else begin
            base    <= ADDR_W'(32'(pe_value) * BS_LEN);
            last_id <= pe_value;
            state   <= LOAD;
          end
        end
        LOAD: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == BS_LEN - 1) state <= DRAIN;
        end
        DRAIN: state <= DONE;
        DONE:  state <= WAIT;
        default: state <= WAIT;
      endcase
    end
  end

  assign skipped = done && bad_id;

  // A configuration word is only written while a bitstream is being loaded.
  a_cfg_only_when_loading: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_en |-> (state == DRAIN || state == LOAD));
  // The interrupt is only acknowledged when the FSM waits for a request.
  a_ack_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> (state == WAIT));

endmodule

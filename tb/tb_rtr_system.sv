// tb_rtr_system: end-to-end test of the self-reconfiguring DSP unit at its
// default size (two candidates, 62976-bit partial bitstreams of 1969 words).
//
// Loads generated partial bitstreams for filterIIR and filterFIR into the
// store, then streams random samples while the partial evaluation register
// is rewritten: to the filter not in the region, to the same value again,
// to a new value while a reconfiguration is running, and to a value with no
// candidate. A cycle-level reference of the unit kept here (register,
// interrupt, controller sequence, region busy window, both filters) predicts
// irq, reconfig_busy, reconfig_done, out_valid and dataout every cycle. At
// each completed load the region's signature is compared with the
// signature of the stored frame words. Also checks the latency from the
// write of sel to done (BS_WORDS + 5 cycles). Counts every mechanism:
// loads of each candidate, samples dropped during reconfiguration, a
// rewrite with an unchanged value (no request), a request raised while
// busy, a skipped value; a mechanism that never happened is a failure.
// The stand-alone full adder beside the unit is driven through all input
// combinations, one per cycle, and checked against integer addition.
module tb_rtr_system;
  import rtr_pkg::*;

  localparam int unsigned ADDR_W = $clog2(NUM_CANDIDATES * BS_WORDS);

  logic clk = 1'b0;
  logic rst_n, sel_we, bs_we, in_valid, out_valid;
  sel_t sel, pe_value, region_id;
  logic [ADDR_W-1:0] bs_waddr;
  cfg_word_t bs_wdata, region_signature;
  sample_t datain, dataout;
  logic irq, reconfig_busy, reconfig_done, reconfig_skipped, region_configured, region_cfg_err;

  logic fa_carry_in, fa_a, fa_b, fa_sum, fa_carry_out;
  int n_fa_carry = 0;

  rtr_system dut (
    .clk, .rst_n, .sel_we, .sel, .bs_we, .bs_waddr, .bs_wdata,
    .in_valid, .datain, .out_valid, .dataout,
    .pe_value, .irq, .reconfig_busy, .reconfig_done, .reconfig_skipped,
    .region_configured, .region_id, .region_cfg_err, .region_signature,
    .fa_carry_in, .fa_a, .fa_b, .fa_sum, .fa_carry_out
  );


  int checks = 0, failures = 0;
  int n_load [NUM_CANDIDATES];
  int n_dropped = 0, n_same = 0, n_busy_req = 0, n_skip = 0;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic cfg_word_t bs_word(int c, int k);
    if (k == 0) return cfg_header(sel_t'(c));
    return cfg_word_t'((c + 1) * 32'h9E3779B1 ^ k * 32'h7FEB352D ^ (k << 11));
  endfunction

  cfg_word_t exp_sig [NUM_CANDIDATES];

  // ---- cycle-level reference of the unit ----
  typedef enum {P_WAIT, P_READ, P_LOAD, P_DRAIN, P_DONE} phase_t;
  phase_t ph;
  sel_t   r_pe, r_seen, r_id, r_active, r_pend;
  logic   r_irq, r_cfgd, r_rbusy, r_skip, r_cfg_en;
  int     r_k, r_wr_k;
  int     hx [3], hy [3];

  // ---- stimulus schedule: cycle -> value written to sel ----
  int cyc;
  int t_write;

  initial begin
    sample_t e;
    logic    run, ack;
    logic    busy_at_write;
    n_load = '{0, 0};
    rst_n = 1'b0; sel_we = 1'b0; sel = SEL_FIR; bs_we = 1'b0; bs_waddr = '0; bs_wdata = '0;
    in_valid = 1'b0; datain = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // load the partial bitstreams
    for (int c = 0; c < NUM_CANDIDATES; c++) begin
      exp_sig[c] = '0;
      for (int k = 0; k < BS_WORDS; k++) begin
        @(negedge clk);
        bs_we = 1'b1; bs_waddr = ADDR_W'(c * BS_WORDS + k); bs_wdata = bs_word(c, k);
        if (k > 0) exp_sig[c] = {exp_sig[c][CFG_W-2:0], exp_sig[c][CFG_W-1]} ^ bs_word(c, k);
      end
    end
    @(negedge clk); bs_we = 1'b0;

    r_pe = SEL_FIR; r_seen = SEL_FIR; r_irq = 1'b0; ph = P_WAIT; r_k = 0; r_id = SEL_FIR;
    r_active = SEL_FIR; r_pend = SEL_FIR; r_cfgd = 1'b1; r_rbusy = 1'b0; r_skip = 1'b0;
    r_cfg_en = 1'b0; r_wr_k = -1;
    hx = '{0, 0, 0}; hy = '{0, 0, 0};
    t_write = -1;

    for (cyc = 0; cyc < 12000; cyc++) begin
      @(negedge clk);
      // stimulus
      sel_we = 1'b0;
      unique case (cyc)
        100:   begin sel_we = 1'b1; sel = SEL_IIR; end     // FIR -> IIR
        2400:  begin sel_we = 1'b1; sel = SEL_IIR; end     // same value: no request
        2600:  begin sel_we = 1'b1; sel = SEL_FIR; end     // IIR -> FIR ...
        3000:  begin sel_we = 1'b1; sel = SEL_IIR; end     // ... changed back while loading
        7400:  begin sel_we = 1'b1; sel = sel_t'(9); end   // no candidate: skipped
        7600:  begin sel_we = 1'b1; sel = SEL_FIR; end     // 9 -> FIR
        default: ;
      endcase
      in_valid = ($urandom_range(0, 3) != 0);
      datain = sample_t'($signed($urandom_range(0, 4000)) - 2000);
      {fa_carry_in, fa_a, fa_b} = 3'(cyc);
      if (sel_we) begin
        t_write = cyc;
        busy_at_write = (ph != P_WAIT) || r_irq;
        if (sel == r_pe) n_same++;
        else if (busy_at_write) n_busy_req++;
      end
      #1;
      // compare with the reference
      run = r_cfgd && !r_rbusy;
      ack = (ph == P_WAIT) && r_irq;
      if (r_active == SEL_FIR) e = sample_t'(int'(datain) + 2 * hx[0] + 3 * hx[1] + 4 * hx[2]);
      else                     e = sample_t'(int'(datain) + hy[0] - hy[1] + hy[2]);
      checks++;
      if (irq !== r_irq) fail($sformatf("cycle %0d irq=%0b expected %0b", cyc, irq, r_irq));
      if (reconfig_busy !== (ph != P_WAIT)) fail($sformatf("cycle %0d reconfig_busy", cyc));
      if (reconfig_done !== (ph == P_DONE)) fail($sformatf("cycle %0d reconfig_done", cyc));
      if (pe_value !== r_pe) fail($sformatf("cycle %0d pe_value", cyc));
      if (out_valid !== (in_valid && run)) fail($sformatf("cycle %0d out_valid=%0b", cyc, out_valid));
      else if (out_valid && dataout !== e)
        fail($sformatf("cycle %0d dataout %0d expected %0d", cyc, dataout, e));
      if (in_valid && !run) n_dropped++;
      if ({fa_carry_out, fa_sum} !== 2'(int'(fa_carry_in) + int'(fa_a) + int'(fa_b)))
        fail($sformatf("cycle %0d full adder", cyc));
      if (fa_carry_out) n_fa_carry++;
      if (region_cfg_err) fail("region configuration error");
      if (ph == P_DONE) begin
        if (r_skip) begin
          if (!reconfig_skipped) fail("skipped not reported");
          n_skip++;
        end else begin
          checks++;
          if (region_signature !== exp_sig[int'(r_id)]) fail("region signature");
          if (region_id !== r_id) fail("region id");
          if (t_write >= 0 && !busy_at_write && cyc - t_write != BS_WORDS + 5)
            fail($sformatf("reconfiguration latency %0d cycles", cyc - t_write));
          n_load[int'(r_id)]++;
        end
      end
      @(posedge clk);
      // advance the reference by one clock edge
      if (run && in_valid) begin
        hx[2] = hx[1]; hx[1] = hx[0]; hx[0] = int'(datain);
        hy[2] = hy[1]; hy[1] = hy[0]; hy[0] = int'(e);
      end
      // region: the word written in this cycle
      if (r_cfg_en) begin
        if (r_wr_k == 0) begin
          r_rbusy = 1'b1; r_cfgd = 1'b0; r_pend = r_id;
          hx = '{0, 0, 0}; hy = '{0, 0, 0};
        end else if (r_wr_k == BS_WORDS - 1) begin
          r_rbusy = 1'b0; r_active = r_pend; r_cfgd = 1'b1;
          hx = '{0, 0, 0}; hy = '{0, 0, 0};
        end
      end
      r_cfg_en = (ph == P_LOAD);
      r_wr_k = r_k;
      // controller
      unique case (ph)
        P_WAIT:  if (r_irq) ph = P_READ;
        P_READ:  begin
          r_k = 0;
          r_skip = (int'(r_pe) >= NUM_CANDIDATES);
          if (r_skip) ph = P_DONE;
          else begin r_id = r_pe; ph = P_LOAD; end
        end
        P_LOAD:  begin
          if (r_k == BS_WORDS - 1) ph = P_DRAIN;
          r_k++;
        end
        P_DRAIN: ph = P_DONE;
        P_DONE:  ph = P_WAIT;
      endcase
      // interrupt generator (reads the register before this edge's write)
      if (r_pe != r_seen) r_irq = 1'b1;
      else if (ack) r_irq = 1'b0;
      r_seen = r_pe;
      if (sel_we) r_pe = sel;
    end
    $display("loads iir=%0d fir=%0d dropped=%0d same-value=%0d request-while-busy=%0d skipped=%0d adder-carries=%0d",
             n_load[0], n_load[1], n_dropped, n_same, n_busy_req, n_skip, n_fa_carry);
    checks++;
    if (n_load[0] < 2 || n_load[1] < 2 || n_dropped == 0 || n_same == 0 || n_busy_req == 0 || n_skip == 0 ||
        n_fa_carry == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

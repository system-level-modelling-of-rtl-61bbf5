// tb_reconfig_region: self-checking test of the reconfiguration region
// model at its default size (1968 frame words per partial bitstream).
//
// Checks that after reset the region runs filterFIR; then writes partial
// bitstreams for filterIIR, filterFIR and a candidate number with no
// candidate, feeding samples all the time. Reference filters here predict
// dataout. Checks: no sample is accepted while a bitstream is written; a
// candidate starts from a cleared history; the signature equals the
// rotate-xor of the frame words written; a stray word without the header tag
// sets cfg_err. Counts reconfigurations, dropped samples and stray words,
// and fails if one never happened.
module tb_reconfig_region;
  import rtr_pkg::*;

  logic clk = 1'b0;
  logic rst_n, cfg_en, cfg_busy, cfg_err, configured, in_valid, out_valid;
  cfg_word_t cfg_data, cfg_signature;
  sel_t active_id;
  sample_t datain, dataout;
  int checks = 0, failures = 0;
  int n_reconf = 0, n_dropped = 0, n_stray = 0;

  reconfig_region dut (
    .clk, .rst_n, .cfg_en, .cfg_data, .cfg_busy, .cfg_err, .cfg_signature,
    .configured, .active_id, .in_valid, .datain, .out_valid, .dataout
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 30) $display("FAIL %s", msg);
  endtask

  // reference state of the candidate currently in the region
  int hx [3], hy [3];
  sel_t ref_id;
  logic ref_cfg;

  // one cycle: present a random sample, optionally a configuration word
  task automatic step(logic en, cfg_word_t w, logic expect_running);
    sample_t e;
    @(negedge clk);
    cfg_en = en; cfg_data = w;
    in_valid = ($urandom_range(0, 3) != 0);
    datain = sample_t'($signed($urandom_range(0, 4000)) - 2000);
    #1;
    checks++;
    if (expect_running) begin
      if (ref_id == SEL_FIR) e = sample_t'(int'(datain) + 2 * hx[0] + 3 * hx[1] + 4 * hx[2]);
      else                   e = sample_t'(int'(datain) + hy[0] - hy[1] + hy[2]);
      if (out_valid !== in_valid) fail("out_valid while running");
      else if (in_valid && dataout !== e)
        fail($sformatf("dataout %0d expected %0d (id %0d) after %0d reconfigurations", dataout, e, ref_id, n_reconf));
    end else begin
      if (out_valid) fail("sample accepted while not running");
      if (in_valid) n_dropped++;
    end
    @(posedge clk);
    if (expect_running && in_valid) begin
      hx[2] = hx[1]; hx[1] = hx[0]; hx[0] = int'(datain);
      hy[2] = hy[1]; hy[1] = hy[0]; hy[0] = int'(e);
    end
  endtask

  task automatic configure(sel_t id);
    cfg_word_t sig, w;
    int salt;
    salt = $urandom;
    step(1'b1, cfg_header(id), ref_cfg);
    sig = '0;
    for (int k = 0; k < PBS_WORDS; k++) begin
      w = cfg_word_t'(k * 32'h2545F491 ^ salt);
      step($urandom_range(0, 7) != 0 || k == PBS_WORDS - 1 ? 1'b1 : 1'b0, w, 1'b0);
      if (cfg_en) sig = {sig[CFG_W-2:0], sig[CFG_W-1]} ^ w;
      else k--;  // a gap: the same word is sent again next cycle
    end
    hx = '{0, 0, 0}; hy = '{0, 0, 0};
    ref_id = id;
    ref_cfg = (int'(id) < NUM_CANDIDATES);
    @(negedge clk);
    cfg_en = 1'b0;
    in_valid = 1'b0;
    checks++;
    if (cfg_busy) fail("still busy after the last word");
    if (cfg_signature !== sig) fail("signature");
    if (active_id !== id) fail("active_id");
    if (configured !== ref_cfg) fail("configured");
    n_reconf++;
  endtask

  initial begin
    rst_n = 1'b0; cfg_en = 1'b0; cfg_data = '0; in_valid = 1'b0; datain = '0;
    hx = '{0, 0, 0}; hy = '{0, 0, 0}; ref_id = SEL_FIR; ref_cfg = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) step(1'b0, '0, 1'b1);
    configure(SEL_IIR);
    for (int n = 0; n < 200; n++) step(1'b0, '0, 1'b1);
    configure(SEL_FIR);
    for (int n = 0; n < 200; n++) step(1'b0, '0, 1'b1);
    configure(SEL_IIR);
    for (int n = 0; n < 100; n++) step(1'b0, '0, 1'b1);
    // stray word without the header tag
    checks++;
    if (cfg_err) fail("cfg_err before a stray word");
    step(1'b1, 32'h12345678, 1'b1);
    @(negedge clk);
    cfg_en = 1'b0;
    in_valid = 1'b0;
    checks++;
    if (!cfg_err) fail("cfg_err not set by a stray word"); else n_stray++;
    for (int n = 0; n < 100; n++) step(1'b0, '0, 1'b1);
    configure(sel_t'(7));
    for (int n = 0; n < 50; n++) step(1'b0, '0, 1'b0);
    configure(SEL_FIR);
    for (int n = 0; n < 100; n++) step(1'b0, '0, 1'b1);
    $display("reconfigurations=%0d dropped samples=%0d stray words=%0d", n_reconf, n_dropped, n_stray);
    checks++;
    if (n_reconf < 5 || n_dropped == 0 || n_stray == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

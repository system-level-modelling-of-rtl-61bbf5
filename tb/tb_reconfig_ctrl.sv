// tb_reconfig_ctrl: self-checking test of reconfig_ctrl at its default size
// (two candidates, 1969-word partial bitstreams).
//
// A memory model here answers the controller's reads one cycle later, like
// the bitstream store. The test raises requests for candidate 0, candidate
// 1 and for values with no candidate, sometimes while a load is running,
// and checks: ack only in the wait state; every configuration word equals
// the stored word, in address order, exactly BS_LEN words per load; done
// comes BS_LEN + 3 cycles after the request was taken; a value with no
// candidate writes nothing and pulses skipped. Counts loads of each
// candidate, skips and requests made while busy, and fails if one of them
// never happened.
module tb_reconfig_ctrl;
  import rtr_pkg::*;

  localparam int unsigned NUM_CAND = NUM_CANDIDATES;
  localparam int unsigned BS_LEN   = BS_WORDS;
  localparam int unsigned ADDR_W   = $clog2(NUM_CAND * BS_LEN);

  logic clk = 1'b0;
  logic rst_n, irq, ack, rd_en, cfg_en, busy, done, skipped;
  logic [ADDR_W-1:0] rd_addr;
  cfg_word_t rd_data, cfg_data;
  sel_t pe_value, last_id;
  int checks = 0, failures = 0;
  int n_load [NUM_CAND];
  int n_skip = 0, n_busy_req = 0;

  reconfig_ctrl dut (
    .clk, .rst_n, .irq, .ack, .pe_value,
    .rd_en, .rd_addr, .rd_data, .cfg_en, .cfg_data,
    .busy, .done, .skipped, .last_id
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cfg_word_t word_at(int a);
    return cfg_word_t'(a * 32'h01000193 + 32'h5bd1e995);
  endfunction

  always_ff @(posedge clk) if (rd_en) rd_data <= word_at(int'(rd_addr));

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // Interrupt source: a request stays pending until acknowledged.
  logic req_set;
  always_ff @(posedge clk) begin
    if (!rst_n)       irq <= 1'b0;
    else if (req_set) irq <= 1'b1;
    else if (ack)     irq <= 1'b0;
  end

  // Check every configuration word against the expected stream.
  int exp_base, exp_idx, t_take, cyc;
  logic loading;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ack && busy) fail("ack while busy");
      if (cfg_en) begin
        checks++;
        if (!loading) fail("configuration word outside a load");
        else if (cfg_data !== word_at(exp_base + exp_idx))
          fail($sformatf("word %0d: got %h", exp_idx, cfg_data));
        exp_idx++;
      end
    end
  end

  task automatic request(sel_t v, bit during_busy);
    int t0;
    @(negedge clk);
    pe_value = v;
    req_set = 1'b1;
    @(negedge clk);
    req_set = 1'b0;
    for (int k = 0; k < (during_busy ? 2 : 1); k++) begin
    // wait for the controller to take the request
    while (!ack) @(negedge clk);
    t0 = cyc;
    loading = 1'b0;
    exp_idx = 0;
    exp_base = int'(v) * BS_LEN;
    @(negedge clk);  // READ_REG
    loading = (int'(v) < NUM_CAND);
    if (during_busy && k == 0) begin
      // a new request arrives while this one is served; it must wait
      req_set = 1'b1;
      @(negedge clk);
      req_set = 1'b0;
      n_busy_req++;
    end
    while (!done) @(negedge clk);
    checks++;
    if (int'(v) < NUM_CAND) begin
      if (cyc - t0 != BS_LEN + 3) fail($sformatf("load took %0d cycles", cyc - t0));
      if (exp_idx != BS_LEN) fail($sformatf("%0d words written", exp_idx));
      if (!skipped && last_id == v) n_load[int'(v)]++;
      else fail("load not reported");
    end else begin
      if (cyc - t0 != 2) fail("skip timing");
      if (exp_idx != 0) fail("words written for a value with no candidate");
      if (skipped) n_skip++;
      else fail("skipped not pulsed");
    end
    @(negedge clk);
    checks++;
    if (busy && !(during_busy && k == 0)) fail("still busy after done");
    loading = 1'b0;
    end
  endtask

  initial begin
    rst_n = 1'b0; req_set = 1'b0; pe_value = SEL_FIR; cyc = 0; loading = 1'b0;
    n_load = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    request(SEL_IIR, 1'b0);
    request(SEL_FIR, 1'b1);  // a second request arrives during the load
    request(sel_t'(9), 1'b0);
    request(SEL_IIR, 1'b0);
    repeat (3) @(negedge clk);
    $display("loads iir=%0d fir=%0d skips=%0d requests-while-busy=%0d",
             n_load[0], n_load[1], n_skip, n_busy_req);
    checks++;
    if (n_load[0] == 0 || n_load[1] == 0 || n_skip == 0 || n_busy_req == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

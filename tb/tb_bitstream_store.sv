// tb_bitstream_store: self-checking test of bitstream_store at its full size
// (two partial bitstreams of 1969 words).
//
// Fills every word with a value computed from its address, reads back all
// words in order and then random addresses, and checks the one-cycle read
// latency and that rdata holds while re is low. Overwrites a random subset
// and checks again.
module tb_bitstream_store;
  import rtr_pkg::*;

  localparam int unsigned WORDS  = NUM_CANDIDATES * BS_WORDS;
  localparam int unsigned ADDR_W = $clog2(WORDS);

  logic clk = 1'b0;
  logic we, re;
  logic [ADDR_W-1:0] waddr, raddr;
  cfg_word_t wdata, rdata;
  int checks = 0, failures = 0;

  bitstream_store dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cfg_word_t model [WORDS];

  function automatic cfg_word_t pattern(int a, int salt);
    return cfg_word_t'((a * 32'h9E3779B1) ^ (salt * 32'h85EBCA77) ^ (a << 7));
  endfunction

  task automatic check(string what, cfg_word_t got, cfg_word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic read_check(int a);
    @(negedge clk);
    re = 1'b1; raddr = ADDR_W'(a);
    @(negedge clk);
    re = 1'b0;
    check("read", rdata, model[a]);
    @(negedge clk);
    check("hold", rdata, model[a]);
  endtask

  initial begin
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = ADDR_W'(a); wdata = pattern(a, 0); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // streaming read, one word per cycle, as the controller reads
    for (int a = 0; a <= WORDS; a++) begin
      @(negedge clk);
      if (a > 0) check("stream", rdata, model[a-1]);
      re = (a < WORDS); raddr = ADDR_W'(a);
    end
    for (int n = 0; n < 300; n++) read_check($urandom_range(0, WORDS - 1));
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(0, WORDS - 1);
      @(negedge clk);
      we = 1'b1; waddr = ADDR_W'(a); wdata = pattern(a, n + 1); model[a] = wdata;
      @(negedge clk); we = 1'b0;
      read_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

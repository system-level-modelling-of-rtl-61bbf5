// tb_fir_filter: self-checking test of fir_filter (filterFIR).
//
// Drives random samples with random gaps (in_valid low) into the filter with
// its default coefficients and into a second instance with signed
// coefficients, and compares y every cycle with a reference computed here
// from the sample history: y = d0*x + d1*x[-1] + d2*x[-2] + d3*x[-3] taken
// modulo 2^16. Also checks that `clear` empties the delay line and that y is
// combinational (valid in the sample's own cycle).
module tb_fir_filter;
  import rtr_pkg::*;

  logic clk = 1'b0;
  logic rst_n, clear, in_valid;
  sample_t x, y_a, y_b;
  int checks = 0, failures = 0;
  int cycles = 0;

  localparam sample_t CA [4] = '{16'sd1, 16'sd2, 16'sd3, 16'sd4};
  localparam sample_t CB [4] = '{-16'sd7, 16'sd300, -16'sd1200, 16'sd31};

  fir_filter dut_a (.clk, .rst_n, .clear, .in_valid, .x, .y(y_a));
  fir_filter #(.COEF(CB)) dut_b (.clk, .rst_n, .clear, .in_valid, .x, .y(y_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [3];

  function automatic sample_t ref_y(sample_t c [4], sample_t xv);
    int acc;
    acc = int'(c[0]) * int'(xv);
    for (int i = 0; i < 3; i++) acc += int'(c[i+1]) * hist[i];
    return sample_t'(acc);
  endfunction

  task automatic check(string what, sample_t got, sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycles);
    end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; x = '0;
    hist = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // impulse response of the default filter: 1, 2, 3, 4, 0
    for (int n = 0; n < 5; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = (n == 0) ? 16'sd1 : 16'sd0;
      #1 check("impulse", y_a, sample_t'(n + 1 < 5 ? n + 1 : 0));
      @(posedge clk);
    end
    @(negedge clk); clear = 1'b1; in_valid = 1'b0; @(negedge clk); clear = 1'b0;
    hist = '{0, 0, 0};
    // random stream
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x = sample_t'($urandom);
      clear = (n == 1500);
      #1;
      check("fir default", y_a, ref_y(CA, x));
      check("fir signed coef", y_b, ref_y(CB, x));
      @(posedge clk);
      if (clear) hist = '{0, 0, 0};
      else if (in_valid) begin
        hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = int'(x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

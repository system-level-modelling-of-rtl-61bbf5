// tb_iir_filter: self-checking test of iir_filter (filterIIR).
//
// Drives random samples with random gaps into the filter with its default
// coefficients and into a second instance with other signed coefficients.
// The reference kept here holds the last three outputs y[-1..-3]:
// y = x + d0*y[-1] + d1*y[-2] + d2*y[-3] modulo 2^16. Also checks the
// impulse response of the default filter and the effect of `clear`.
module tb_iir_filter;
  import rtr_pkg::*;

  logic clk = 1'b0;
  logic rst_n, clear, in_valid;
  sample_t x, y_a, y_b;
  int checks = 0, failures = 0;

  localparam sample_t CA [3] = '{16'sd1, -16'sd1, 16'sd1};
  localparam sample_t CB [3] = '{16'sd3, -16'sd250, 16'sd17};

  iir_filter dut_a (.clk, .rst_n, .clear, .in_valid, .x, .y(y_a));
  iir_filter #(.COEF(CB)) dut_b (.clk, .rst_n, .clear, .in_valid, .x, .y(y_b));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ha [3], hb [3];

  function automatic sample_t ref_y(sample_t c [3], int h [3], sample_t xv);
    int acc;
    acc = int'(xv);
    for (int i = 0; i < 3; i++) acc += int'(c[i]) * h[i];
    return sample_t'(acc);
  endfunction

  task automatic check(string what, sample_t got, sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // impulse response of y = x + y[-1] - y[-2] + y[-3]
  localparam int IMP [8] = '{1, 1, 0, 0, 1, 1, 0, 0};

  initial begin
    sample_t ea, eb;
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; x = '0;
    ha = '{0, 0, 0}; hb = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = (n == 0) ? 16'sd1 : 16'sd0;
      #1 check("impulse", y_a, sample_t'(IMP[n]));
    end
    @(negedge clk); clear = 1'b1; in_valid = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      clear = (n == 1400);
      in_valid = ($urandom_range(0, 3) != 0);
      x = sample_t'($signed($urandom_range(0, 2000)) - 1000);
      #1;
      ea = ref_y(CA, ha, x);
      eb = ref_y(CB, hb, x);
      check("iir default", y_a, ea);
      check("iir signed coef", y_b, eb);
      @(posedge clk);
      if (clear) begin
        ha = '{0, 0, 0}; hb = '{0, 0, 0};
      end else if (in_valid) begin
        ha[2] = ha[1]; ha[1] = ha[0]; ha[0] = int'(ea);
        hb[2] = hb[1]; hb[1] = hb[0]; hb[0] = int'(eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dsp_mux: self-checking test of dsp_mux, the simulation model of the
// reconfigurable DSP unit (both filters plus a multiplexer on sel).
//
// Random samples with random gaps are fed while sel changes at random among
// 0 (filterIIR), 1 (filterFIR) and values with no candidate. Reference
// models of both filters run here on every accepted sample, whichever is
// selected, and dataout/out_valid are compared every cycle. Counts how often
// each selection was exercised and fails if one never was.
module tb_dsp_mux;
  import rtr_pkg::*;

  logic clk = 1'b0;
  logic rst_n, clear, in_valid, out_valid;
  sel_t sel;
  sample_t datain, dataout;
  int checks = 0, failures = 0;
  int n_iir = 0, n_fir = 0, n_none = 0;

  dsp_mux dut (.clk, .rst_n, .clear, .sel, .in_valid, .datain, .out_valid, .dataout);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default coefficients: FIR 1,2,3,4 ; IIR 1,-1,1
  int hx [3], hy [3];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    sample_t e_fir, e_iir, e_out;
    logic    e_valid;
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; datain = '0; sel = SEL_FIR;
    hx = '{0, 0, 0}; hy = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 15) == 0) begin
        int r;
        r = $urandom_range(0, 9);
        sel = (r < 4) ? SEL_IIR : (r < 8) ? SEL_FIR : sel_t'($urandom_range(2, 15));
      end
      in_valid = ($urandom_range(0, 3) != 0);
      datain = sample_t'($signed($urandom_range(0, 4000)) - 2000);
      #1;
      e_fir = sample_t'(int'(datain) + 2 * hx[0] + 3 * hx[1] + 4 * hx[2]);
      e_iir = sample_t'(int'(datain) + hy[0] - hy[1] + hy[2]);
      unique case (sel)
        SEL_IIR: begin e_out = e_iir; e_valid = in_valid; n_iir++;  end
        SEL_FIR: begin e_out = e_fir; e_valid = in_valid; n_fir++;  end
        default: begin e_out = '0;    e_valid = 1'b0;     n_none++; end
      endcase
      check("out_valid", int'(out_valid), int'(e_valid));
      check("dataout", int'(dataout), int'(e_out));
      @(posedge clk);
      if (in_valid) begin
        hx[2] = hx[1]; hx[1] = hx[0]; hx[0] = int'(datain);
        hy[2] = hy[1]; hy[1] = hy[0]; hy[0] = int'(e_iir);
      end
    end
    $display("selections: iir=%0d fir=%0d none=%0d", n_iir, n_fir, n_none);
    checks++;
    if (n_iir == 0 || n_fir == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

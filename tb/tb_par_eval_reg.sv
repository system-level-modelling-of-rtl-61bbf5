// tb_par_eval_reg: self-checking test of par_eval_reg.
//
// Checks the reset value (filterFIR, 1), that a write strobe loads the new
// value one cycle later, and that the value holds while we is low, over a
// random sequence of writes.
module tb_par_eval_reg;
  import rtr_pkg::*;

  logic clk = 1'b0;
  logic rst_n, we;
  sel_t d, q;
  int checks = 0, failures = 0;

  par_eval_reg dut (.clk, .rst_n, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, sel_t got, sel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    sel_t model;
    rst_n = 1'b0; we = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check("reset value", q, SEL_FIR);
    rst_n = 1'b1;
    model = SEL_FIR;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0);
      d  = sel_t'($urandom);
      @(posedge clk);
      if (we) model = d;
      @(negedge clk);
      check("value", q, model);
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

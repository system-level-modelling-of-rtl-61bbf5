// tb_intr_gen: self-checking test of intr_gen.
//
// Drives a random sequence of register values and acknowledge pulses and
// compares irq every cycle with a reference: irq rises the cycle after the
// watched value changes, stays high until acknowledged, and a change in the
// same cycle as an acknowledge keeps it high. Counts the rises, the
// acknowledges and the change-during-ack cases and fails if one never
// happened.
module tb_intr_gen;
  import rtr_pkg::*;

  logic clk = 1'b0;
  logic rst_n, ack, irq;
  sel_t value;
  int checks = 0, failures = 0;
  int n_rise = 0, n_ack = 0, n_race = 0;

  intr_gen dut (.clk, .rst_n, .value, .ack, .irq);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_t seen;
    logic e_irq;
    rst_n = 1'b0; ack = 1'b0; value = SEL_FIR;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (irq !== 1'b0) failures++;
    rst_n = 1'b1;
    seen = SEL_FIR; e_irq = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) value = sel_t'($urandom_range(0, 2));
      ack = e_irq && ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (value != seen) begin
        if (!e_irq) n_rise++;
        if (ack) n_race++;
        e_irq = 1'b1;
      end else if (ack) begin
        e_irq = 1'b0;
      end
      if (ack) n_ack++;
      seen = value;
      @(negedge clk);
      checks++;
      if (irq !== e_irq) begin
        failures++;
        $display("FAIL cycle %0d: irq=%0b expected %0b", n, irq, e_irq);
      end
      ack = 1'b0;
    end
    $display("irq rises=%0d acks=%0d change-during-ack=%0d", n_rise, n_ack, n_race);
    checks++;
    if (n_rise == 0 || n_ack == 0 || n_race == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

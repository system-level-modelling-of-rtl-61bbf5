// tb_half_adder: exhaustive self-checking test of half_adder.
//
// Applies every input combination (a, b; the third loop bit is unused) and compares the outputs with the sum of
// the input bits computed here as an integer.
module tb_half_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  half_adder dut (.a, .b, .sum(s), .carry(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {c, a, b} = 3'(v);
      #1;
      total = int'(a) + int'(b);
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: got %0b%0b expected %0d", a, b, c, co, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

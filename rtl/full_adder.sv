// full_adder: one-bit full adder built from two half adders.
//
// This is the small stateless circuit used to show how a combinational
// block is composed from smaller ones. The first half adder adds a and b;
// the second adds the carry-in to that partial sum, giving the sum. The
// carry-out is the xor of the two half-adder carries: at most one of them
// can be 1, so xor and or give the same result, and the composition uses
// xor. Purely combinational, no clock; the structure follows the circuit's
// description.
module full_adder (
  input  logic carry_in,
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry_out
);

  logic sum1, carry1, carry2;

  half_adder u_ha1 (.a(a),        .b(b),    .sum(sum1), .carry(carry1));
  half_adder u_ha2 (.a(carry_in), .b(sum1), .sum(sum),  .carry(carry2));

  assign carry_out = carry2 ^ carry1;

endmodule

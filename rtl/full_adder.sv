// full_adder: one-bit full adder, organised like a three-module fast adder
// cell.
//
//   M1  forms the generate g = a&b, the propagate p = a|b and x = a^b.
//   M2  is a one-stage carry look-ahead: cout = g | (p & cin).
//   M3  forms the sum from M1's xor and the carry in: sum = x ^ cin.
//
// This gives sum = (a^b)^cin and carry = a.b + cin.(a+b), which equals the
// textbook a.b + cin.(a^b). The split into M1/M2/M3 and the use of a|b as the
// propagate term follow the design; the transistor-level GDI cells behind each
// module have no place in RTL and are modelled by their logic functions.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g, p, x;

  // M1: generate, propagate and xor of the two operand bits
  assign g = a & b;
  assign p = a | b;
  assign x = a ^ b;

  // M2: look-ahead carry
  assign cout = g | (p & cin);

  // M3: sum
  assign sum = x ^ cin;
endmodule

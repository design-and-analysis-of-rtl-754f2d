// half_adder: one-bit half adder (sum = a^b, carry = a&b), the "HA" cell at
// the right-hand edge of each row of the array multiplier. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule

// ripple_adder: W-bit carry-ripple adder built from W full_adder cells.
//
// Bit k adds a[k], b[k] and the carry of bit k-1; bit 0 takes cin. The carry
// out of the top cell is brought out as cout, so a user can see when the W-bit
// sum wrapped. The adder width (8 bits, eight full-adder cells) is the
// design's; the ripple organisation is the simplest chain of those cells and
// is this implementation's choice. Combinational, no clock; the delay grows
// with W through the carry chain.
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .a   (a[k]),
      .b   (b[k]),
      .cin (c[k]),
      .sum (sum[k]),
      .cout(c[k+1])
    );
  end

  assign cout = c[W];
endmodule

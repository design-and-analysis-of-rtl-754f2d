// array_multiplier: M x N unsigned array multiplier, p = x * y.
//
// Partial products x[k] & y[j] come from M*N AND gates. Row 0 is the partial
// product of y[0]; each following row j adds the partial product of y[j] to
// the previous row shifted right by one bit, with a carry that ripples from
// the least significant cell (a half adder) towards the most significant one.
// The top input of a row is the previous row's carry out; in the first adder
// row that input is zero, so that cell is a half adder as well. The low bit of
// every row is a product bit; the last row and its carry give the upper bits.
// For M = N = 4 this is the 16-AND, 4-HA, 8-FA array with the cell names
// S10..S33 and C10..C33 of the usual drawing of this array: P0 = x0y0, P1 = S10, P2 = S20,
// P3 = S30, P4..P6 = S31..S33, P7 = C33. The longest path runs along the
// carry chains, giving a delay of about
// ((M-1)+(N-2))*T_carry + (N-1)*T_sum + T_and.
// The structure and the 4x4 default size follow the design. Purely
// combinational, no clock.
module array_multiplier #(
  parameter int unsigned M = 4,   // width of x (columns of the array)
  parameter int unsigned N = 4    // width of y (rows of the array)
) (
  input  logic [M-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [M+N-1:0] p
);
  // s[j][k] / c[j][k]: sum and carry out of cell k in row j.
  // Row 0 holds the plain partial products of y[0], with no carry.
  logic [M-1:0] s [N];
  logic [M-1:0] c [N];
  logic [N-1:1] row_cout;

  for (genvar k = 0; k < M; k++) begin : g_row0
    assign s[0][k] = x[k] & y[0];
    assign c[0][k] = 1'b0;
  end

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [M-1:0] pp;   // partial product of y[j]
    logic [M-1:0] opa;  // previous row shifted right by one bit
    assign pp = x & {M{y[j]}};
    if (j == 1) begin : g_first
      // row 0 has no carry: the top input of the first adder row is empty
      assign opa = {1'b0, s[0][M-1:1]};
    end else begin : g_next
      assign opa = {row_cout[j-1], s[j-1][M-1:1]};
    end

    for (genvar k = 0; k < M; k++) begin : g_cell
      if (k == 0) begin : g_ha
        half_adder u_ha (.a(opa[k]), .b(pp[k]), .sum(s[j][k]), .cout(c[j][k]));
      end else if (j == 1 && k == M - 1) begin : g_ha_top
        // the first row has no carry from above in its top cell
        half_adder u_ha (.a(pp[k]), .b(c[j][k-1]), .sum(s[j][k]), .cout(c[j][k]));
      end else begin : g_fa
        full_adder u_fa (.a(opa[k]), .b(pp[k]), .cin(c[j][k-1]),
                         .sum(s[j][k]), .cout(c[j][k]));
      end
    end
    assign row_cout[j] = c[j][M-1];
  end

  // low product bits: bit 0 of every row
  for (genvar j = 0; j < N; j++) begin : g_plow
    assign p[j] = s[j][0];
  end
  // high product bits: the rest of the last row and its carry
  for (genvar k = 1; k < M; k++) begin : g_phigh
    assign p[N-1+k] = s[N-1][k];
  end
  assign p[M+N-1] = row_cout[N-1];

  initial begin
    assert (M >= 2 && N >= 2) else $fatal(1, "array_multiplier needs M, N >= 2");
  end
endmodule

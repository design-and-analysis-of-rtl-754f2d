// fir_tap: one tap of the direct-form FIR filter.
//
// The incoming sample x_in passes through a unit_delay (one clock), the
// delayed sample is multiplied by the tap coefficient in an array_multiplier,
// and the product is added to the partial sum arriving from the previous tap
// by a ripple_adder. The delayed sample x_out and the new partial sum sum_out
// go on to the next tap, so a chain of taps forms the tapped delay line and
// the adder chain. This tap structure (delay, multiplier, adder) follows the
// design. cout is the carry out of the tap's adder: 1 when the ACC_W-bit
// partial sum wrapped; bringing it out is this implementation's addition.
// Timing: x_out is registered (updates on the rising edge); the path from
// x_out and sum_in to sum_out is combinational.
module fir_tap #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W
) (
  input  logic              clk,
  input  logic [DATA_W-1:0] x_in,
  input  logic [COEF_W-1:0] coef,
  input  logic [ACC_W-1:0]  sum_in,
  output logic [DATA_W-1:0] x_out,
  output logic [ACC_W-1:0]  sum_out,
  output logic              cout
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic [PROD_W-1:0] prod;
  logic [ACC_W-1:0]  prod_ext;

  unit_delay #(.W(DATA_W)) u_delay (
    .clk(clk),
    .d  (x_in),
    .q  (x_out)
  );

  array_multiplier #(.M(DATA_W), .N(COEF_W)) u_mult (
    .x(x_out),
    .y(coef),
    .p(prod)
  );

  assign prod_ext = ACC_W'(prod);

  ripple_adder #(.W(ACC_W)) u_add (
    .a   (sum_in),
    .b   (prod_ext),
    .cin (1'b0),
    .sum (sum_out),
    .cout(cout)
  );

  initial begin
    assert (ACC_W >= PROD_W) else $fatal(1, "fir_tap: ACC_W must hold a product");
  end
endmodule

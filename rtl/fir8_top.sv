// fir8_top: eight-tap direct-form FIR filter with linear phase,
//
//   y[n] = sum_{i=0}^{TAPS-1} h[i] * x[n-i],   h[i] = h[TAPS-1-i].
//
// The newest sample x_in goes straight to the tap-0 multiplier; taps 1 to
// TAPS-1 are fir_tap instances chained so that each delays the sample by one
// more clock and adds its product to the running sum. The TAPS/2 stored
// coefficients sit in coef_memory, which mirrors them onto the taps. Samples
// and coefficients are unsigned 4-bit numbers, products 8 bits, and the sum
// is carried through 8-bit adders, so y_out is the filter output modulo 256;
// ovf is 1 when any adder of the chain carried out, i.e. when y_out wrapped.
// Widths, tap count, structure and coefficient halving follow the design;
// the coefficient write port and the ovf flag are this implementation's
// additions. Set ACC_W to 11 for an exact output with the default sizes.
//
// Timing: one sample per clock. x_in is taken into the delay line on each
// rising edge of clk; y_out and ovf are combinational in x_in and in the
// delay-line contents, so they are valid once x_in has settled in each cycle,
// before the next rising edge. Coefficient writes (coef_we, coef_addr,
// coef_wdata) are taken on the rising edge. There is no reset: shift in
// TAPS-1 zero samples to clear the delay line.
module fir8_top #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W,
  localparam int unsigned NCOEF   = TAPS / 2,
  localparam int unsigned CADDR_W = (NCOEF > 1) ? $clog2(NCOEF) : 1
) (
  input  logic               clk,
  input  logic               coef_we,
  input  logic [CADDR_W-1:0] coef_addr,
  input  logic [COEF_W-1:0]  coef_wdata,
  input  logic [DATA_W-1:0]  x_in,
  output logic [ACC_W-1:0]   y_out,
  output logic               ovf
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic [COEF_W-1:0] coef [TAPS];
  logic [DATA_W-1:0] x    [TAPS];   // x[i] = x[n-i]
  logic [ACC_W-1:0]  psum [TAPS];   // partial sum after tap i
  logic [TAPS-1:0]   carry;
  logic [PROD_W-1:0] prod0;

  coef_memory #(.TAPS(TAPS), .COEF_W(COEF_W)) u_coef (
    .clk  (clk),
    .we   (coef_we),
    .waddr(coef_addr),
    .wdata(coef_wdata),
    .coef (coef)
  );

  // tap 0: the newest sample, multiplied without delay
  assign x[0] = x_in;

  array_multiplier #(.M(DATA_W), .N(COEF_W)) u_mult0 (
    .x(x[0]),
    .y(coef[0]),
    .p(prod0)
  );

  assign psum[0]  = ACC_W'(prod0);
  assign carry[0] = 1'b0;

  for (genvar i = 1; i < TAPS; i++) begin : g_tap
    fir_tap #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_tap (
      .clk    (clk),
      .x_in   (x[i-1]),
      .coef   (coef[i]),
      .sum_in (psum[i-1]),
      .x_out  (x[i]),
      .sum_out(psum[i]),
      .cout   (carry[i])
    );
  end

  assign y_out = psum[TAPS-1];
  assign ovf   = |carry;

  initial begin
    assert (ACC_W >= PROD_W) else $fatal(1, "fir8_top: ACC_W must hold a product");
  end
endmodule

// coef_memory: coefficient store of the linear-phase FIR filter.
//
// A linear-phase filter has symmetric coefficients, h[i] = h[TAPS-1-i], so
// only TAPS/2 of them are stored: four 4-bit words for the eight-tap filter.
// The words are edge-triggered registers written one at a time: when we is 1
// at a rising edge of clk, word waddr takes wdata. The memory drives all TAPS
// tap coefficients at once; tap i reads word i for the first half of the
// filter and word TAPS-1-i for the mirrored second half.
// Storing half of the coefficients and their sizes follow the design; the
// write port (one word per clock, no read port) is this implementation's
// choice, as the design does not say how coefficients are loaded. There is
// no reset: the coefficients are meaningless until written.
// Timing: a write shows on coef one clock edge later.
module coef_memory #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  localparam int unsigned NCOEF   = TAPS / 2,
  localparam int unsigned CADDR_W = (NCOEF > 1) ? $clog2(NCOEF) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [CADDR_W-1:0] waddr,
  input  logic [COEF_W-1:0]  wdata,
  output logic [COEF_W-1:0]  coef [TAPS]
);
  logic [COEF_W-1:0] mem [NCOEF];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    assign coef[i] = mem[fir_pkg::mirror_index(i, TAPS)];
  end

  // a write must address one of the stored words
  a_waddr_in_range: assert property (@(posedge clk) we |-> (int'(waddr) < NCOEF))
    else $error("coef_memory: write address %0d out of range", waddr);

  initial begin
    assert (TAPS >= 2 && TAPS % 2 == 0)
      else $fatal(1, "coef_memory: a linear-phase store needs an even TAPS");
  end
endmodule

// fir_pkg: sizes and types shared by the 8-tap linear-phase FIR filter.
//
// The filter has eight taps, 4-bit unsigned input samples and 4-bit unsigned
// coefficients, so every tap product is 8 bits wide and the products are
// summed by a chain of 8-bit adders. These numbers are the design's own
// (eight taps, four-bit coefficients, 4x4 multipliers with 8-bit output,
// 8-bit adders). Because the filter has linear phase, only TAPS/2 coefficients
// are stored and tap i uses the same coefficient as tap TAPS-1-i.
package fir_pkg;

  localparam int unsigned TAPS     = 8;   // number of taps (filter order 7)
  localparam int unsigned DATA_W   = 4;   // input sample width
  localparam int unsigned COEF_W   = 4;   // coefficient width
  localparam int unsigned PROD_W   = DATA_W + COEF_W;  // multiplier output width
  localparam int unsigned ACC_W    = 8;   // width of the adders in the sum chain
  localparam int unsigned NCOEF    = TAPS / 2;         // stored coefficients
  localparam int unsigned CADDR_W  = $clog2(NCOEF);    // coefficient address width

  typedef logic [DATA_W-1:0]  sample_t;
  typedef logic [COEF_W-1:0]  coef_t;
  typedef logic [PROD_W-1:0]  prod_t;
  typedef logic [ACC_W-1:0]   acc_t;
  typedef logic [CADDR_W-1:0] caddr_t;

  // One write to the coefficient store.
  typedef struct packed {
    logic   we;     // write strobe, sampled on the rising clock edge
    caddr_t addr;   // which stored coefficient (0 .. NCOEF-1)
    coef_t  data;   // the coefficient value
  } coef_wr_t;

  // Which stored coefficient tap i uses: i for the first half, TAPS-1-i for
  // the mirrored second half.
  function automatic int unsigned mirror_index(int unsigned tap, int unsigned ntaps);
    return (tap < ntaps / 2) ? tap : ntaps - 1 - tap;
  endfunction

endpackage

// d_latch: one-bit level-sensitive D latch with true and complement outputs.
//
// While en is 1 the latch is transparent and q follows d; while en is 0 it
// holds the last value. This is the behaviour of the cross-coupled NAND latch
// gated by the clock, with outputs Q and Q'. A transparent latch is the
// intended storage element here, so the latch that the tools report for this
// module is deliberate. There is no reset: like the cell it models, the latch
// holds whatever it last let through. Timing: q changes whenever d changes
// while en is high, and is frozen by the falling edge of en.
module d_latch (
  input  logic d,
  input  logic en,
  output logic q,
  output logic qn
);
  always_latch begin
    if (en) q = d;
  end

  assign qn = ~q;
endmodule

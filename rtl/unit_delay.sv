// unit_delay: W-bit z^-1 sample delay (the "4 bit D-latch" of a tap).
//
// Each bit is a master-slave pair of d_latch cells. The master is transparent
// while clk is low and the slave while clk is high, so q takes the value d
// had just before the rising edge of clk and holds it for a whole clock
// period: the register updates only on the 0-to-1 transition of the clock.
// Building the delay from two latches per bit follows the design; the latches
// that the tools report in this module are those cells and are deliberate.
// There is no reset: after power-up q holds an arbitrary value until the
// first rising edge (a filter clears its delay line by shifting in zeros).
// Interface: clk, d[W], q[W]. Latency: one clock.
module unit_delay #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] m;     // master outputs
  logic         clk_n;

  assign clk_n = ~clk;

  for (genvar k = 0; k < W; k++) begin : g_bit
    // the complement outputs of the cells are not needed here
    d_latch u_master (.d(d[k]), .en(clk_n), .q(m[k]), .qn());
    d_latch u_slave  (.d(m[k]), .en(clk),   .q(q[k]), .qn());
  end
endmodule

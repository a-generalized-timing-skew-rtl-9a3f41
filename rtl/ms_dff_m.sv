// ms_dff_m: master-slave D flip-flop that also brings out its master latch.
//
// Two transparent latches in series. The master follows D while CLK is low
// and holds while CLK is high; the slave follows the master while CLK is
// high and holds while CLK is low, so Q changes on the rising edge of CLK.
// The master output M is the master latch itself: for a D that settles
// while CLK is high (as in the ring counter), M takes the new value at the
// falling edge, half a clock period ahead of Q. That early copy is what the
// edge decision logic of the clock generators uses to tell apart the two
// halves of a slave pulse.
//
// Ports: clk, d; set_n and clr_n are asynchronous, active low, and act on
// both latches (clear wins when both are low); m is the master output with
// the polarity of D, q and q_n the slave outputs. No internal delays: the
// outputs change in the same time step as their cause.
//
// The latch structure, the master tap and the active-low set/clear pins
// follow the published schematic. Which latches the set and clear reach and
// their priority are this design's choice. The two latches are intentional:
// the master output does not exist in an edge-triggered description, so the
// latch inferences reported by synthesis tools stand. When flip-flops are
// chained into a ring, lint tools see a loop through the latches; the two
// latches of a stage are never transparent together, so the loop is
// broken in every clock phase and is not combinational.
`timescale 1ps/1ps
module ms_dff_m (
  input  logic clk,
  input  logic d,
  input  logic set_n,
  input  logic clr_n,
  output logic m,
  output logic q,
  output logic q_n
);

  // Master latch: transparent while clk is low.
  always_latch begin
    if (!clr_n)      m = 1'b0;
    else if (!set_n) m = 1'b1;
    else if (!clk)   m = d;
  end

  // Slave latch: transparent while clk is high.
  always_latch begin
    if (!clr_n)      q = 1'b0;
    else if (!set_n) q = 1'b1;
    else if (clk)    q = m;
  end

  assign q_n = ~q;

endmodule

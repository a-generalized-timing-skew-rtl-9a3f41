// edb: Edge Decision Block.
//
// A single AND-OR-INVERT stage, out = not(A and B) and not C, which is the
// published transistor schematic (series PMOS on C above parallel PMOS on
// A and B; series NMOS on A and B in parallel with an NMOS on C). C (a
// ring-counter slave output, active low) opens a window; inside the window
// the output is high until the clock edge that makes A and B both high
// pulls it low. Tying C to 0 turns the block into a plain NAND of A and B,
// which the switching-scheme generator uses so that its common sampling
// clock passes through the same kind of gate as the other phases.
//
// Purely combinational, no delay.
`timescale 1ps/1ps
module edb (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic out
);

  assign out = ~((a & b) | c);

endmodule

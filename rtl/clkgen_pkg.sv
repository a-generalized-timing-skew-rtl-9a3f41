// clkgen_pkg: constants shared by the multi-phase clock generators.
//
// The generators place their critical edges by delaying the master clock
// through fixed delay lines (d0, dpre, d1, d2, da in the schematics). No
// delay values are published for the design, only the ordering they must
// obey; the defaults below are this implementation's choice for a 160 MHz
// master clock (6250 ps period), the frequency at which the 4-phase version
// was evaluated. All times are in picoseconds.
//
// Orderings the defaults satisfy (ds = clock-to-slave delay of the ring
// counter, zero in this RTL):
//   A/D generator      : D0 + DPRE < D1 + ds          (positive non-overlap)
//   D/A and switching  : D0 < D1 + ds < D2 < D1 + ds + T/2
`timescale 1ps/1ps
package clkgen_pkg;

  // Number of interleaved paths (phases); the evaluated version has four.
  parameter int unsigned NPHASE_DEFAULT = 4;

  // Master clock period at 160 MHz.
  parameter int unsigned TCLK_PS = 6250;

  // Delay-line defaults (this implementation's choice; no values are published).
  parameter int unsigned D0_PS   = 200;  // master clock -> pre-clk
  parameter int unsigned DPRE_PS = 150;  // pre-clk -> post-clk (A/D generator)
  parameter int unsigned D1_PS   = 600;  // master clock -> ring-counter clock
  parameter int unsigned D2_PS   = 900;  // master clock -> post-DFF-clk (inverted)
  parameter int unsigned DA_PS   = 100;  // pre-phase to post-phase rising-edge spacing

endpackage

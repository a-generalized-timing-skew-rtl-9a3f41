// clkgen_platform: the multi-phase clock generation platform.
//
// One accurate master clock feeds the three generators of the platform side
// by side, each with its own outputs, so one block can serve a
// time-interleaved A/D converter, a D/A converter or N-path filter, and a
// system that uses the edge-driven switching scheme:
//   ad_*  : clkgen_ad  - N post-phases and N pre-phases; pre-phase falling
//                        edges (sampling instants) set by the master clock
//   da_*  : clkgen_da  - N post-phases and N pre-phases; rising edges of both
//                        and falling edges of pre-phases set by the master clock
//   eds_* : clkgen_eds - N phases plus the common sampling clock phi_s
// All three share the same building blocks: a self-starting mod-N ring
// counter of master-slave flip-flops with master outputs, edge decision
// blocks and delay cells. Every output is active high except phi_s, whose
// active part is its short low pulse. See the generator modules for the
// edge timing. The outputs settle within N + 1 master clock periods of the
// clock starting; there is no reset.
//
// Putting the three generators side by side in one top is this design's
// choice; the published platform describes them as three configurations
// of the same blocks.
`timescale 1ps/1ps
module clkgen_platform #(
  parameter int unsigned N       = clkgen_pkg::NPHASE_DEFAULT,
  parameter int unsigned D0_PS   = clkgen_pkg::D0_PS,
  parameter int unsigned DPRE_PS = clkgen_pkg::DPRE_PS,
  parameter int unsigned D1_PS   = clkgen_pkg::D1_PS,
  parameter int unsigned D2_PS   = clkgen_pkg::D2_PS,
  parameter int unsigned DA_PS   = clkgen_pkg::DA_PS
) (
  input  logic         clk,
  output logic [N-1:0] ad_phi,
  output logic [N-1:0] ad_phi_p,
  output logic [N-1:0] da_phi,
  output logic [N-1:0] da_phi_p,
  output logic [N-1:0] eds_phi,
  output logic         eds_phi_s
);

  clkgen_ad #(.N(N), .D0_PS(D0_PS), .DPRE_PS(DPRE_PS), .D1_PS(D1_PS), .DA_PS(DA_PS)) u_ad (
    .clk  (clk),
    .phi  (ad_phi),
    .phi_p(ad_phi_p)
  );

  clkgen_da #(.N(N), .D0_PS(D0_PS), .D1_PS(D1_PS), .D2_PS(D2_PS), .DA_PS(DA_PS)) u_da (
    .clk  (clk),
    .phi  (da_phi),
    .phi_p(da_phi_p)
  );

  clkgen_eds #(.N(N), .D0_PS(D0_PS), .D1_PS(D1_PS), .D2_PS(D2_PS), .DA_PS(DA_PS)) u_eds (
    .clk  (clk),
    .phi  (eds_phi),
    .phi_s(eds_phi_s)
  );

endmodule

// clkgen_eds: N-phase clock generator for the edge-driven switching scheme.
//
// In this scheme a common switch, shared by all paths and driven by the
// full-rate clock phi_s, decides every sampling instant; phi_s is low for a
// short pulse each master period and the path phases phi[m] only have to
// fall inside that pulse. No pre-phases are needed. The path phases come
// from the same circuit as the post-phases of the D/A generator, and phi_s
// from one more EDB with its C input tied to 0 (a NAND of pre-clk and the
// delayed post-DFF-clk), so that it sees the same gate delay as the phases.
//
// Structure (EDB: out = not(A and B) and not C):
//   pre-clk      = clk delayed D0_PS
//   post-DFF-clk = not clk, delayed D2_PS
//   counter clk  = clk delayed D1_PS
//   phi_s  = EDB(A = post-DFF-clk delayed DA_PS, B = pre-clk,      C = 0)
//   phi[m] = EDB(A = not master[m],             B = post-DFF-clk, C = slave[m])
//
// Timing (r_k master rising edges, stage m pulsing in cycle k):
//   phi_s  : falls r_k + D0, rises r_k + D2 + DA (every period)
//   phi[m] : rises r_k + D2, falls r_{k+1} + D1 + ds, inside the phi_s pulse
//   non-overlap between phi[m] and phi[m+1] = D2 - D1 - ds
// Requires D0 < D1 + ds < D2 + DA and D1 + ds < D2 < D1 + ds + T/2.
//
// The wiring follows the published block diagram; delay values and the
// behavioural delay cells are this design's own. Phase m on index m-1.
`timescale 1ps/1ps
module clkgen_eds #(
  parameter int unsigned N     = clkgen_pkg::NPHASE_DEFAULT,
  parameter int unsigned D0_PS = clkgen_pkg::D0_PS,
  parameter int unsigned D1_PS = clkgen_pkg::D1_PS,
  parameter int unsigned D2_PS = clkgen_pkg::D2_PS,
  parameter int unsigned DA_PS = clkgen_pkg::DA_PS
) (
  input  logic         clk,
  output logic [N-1:0] phi,
  output logic         phi_s
);

  logic         pre_clk, post_dff_clk, post_dff_clk_d, rc_clk;
  logic [N-1:0] master, slave, master_n;

  delay_line #(.DELAY_PS(D0_PS))                 u_d0 (.in(clk),          .out(pre_clk));
  delay_line #(.DELAY_PS(D2_PS), .INVERT(1'b1))  u_d2 (.in(clk),          .out(post_dff_clk));
  delay_line #(.DELAY_PS(D1_PS))                 u_d1 (.in(clk),          .out(rc_clk));
  delay_line #(.DELAY_PS(DA_PS))                 u_da (.in(post_dff_clk), .out(post_dff_clk_d));

  ring_counter #(.N(N)) u_ring (
    .clk   (rc_clk),
    .set_n ('1),
    .clr_n ('1),
    .master(master),
    .slave (slave)
  );

  assign master_n = ~master;

  edb u_edb_s (.a(post_dff_clk_d), .b(pre_clk), .c(1'b0), .out(phi_s));

  for (genvar i = 0; i < N; i++) begin : g_phase
    edb u_edb (.a(master_n[i]), .b(post_dff_clk), .c(slave[i]), .out(phi[i]));
  end

endmodule

// clkgen_da: skew-free N-phase clock generator for D/A conversion and
// N-path sampled-data filters (edge-driven clocking).
//
// An output multiplexer transfers charge when the post-phase rises, and an
// N-path filter also samples on the pre-phase falling edge, so two edges of
// every path are critical. Both are taken from shared delayed copies of the
// master clock: the rising edges of both phases from the falling edge of
// post-DFF-clk (the master clock inverted and delayed by D2_PS), the
// falling edge of the pre-phase from the rising edge of pre-clk (delayed by
// D0_PS). The ring counter only opens the window of each path.
//
// Structure (EDB: out = not(A and B) and not C):
//   pre-clk      = clk delayed D0_PS
//   post-DFF-clk = not clk, delayed D2_PS
//   counter clk  = clk delayed D1_PS
//   phi_p[m] = EDB(A = pre-clk,      B = post-DFF-clk,              C = slave[m])
//   phi[m]   = EDB(A = not master[m], B = post-DFF-clk delayed DA_PS, C = slave[m])
// pre-clk and post-DFF-clk are both high only for a short slot at the start
// of each master clock period; phi_p[m] is high inside its slave window
// except during those slots. The inverted master output is high only in the
// first half of the window, so the post-DFF-clk pulse that would pull phi[m]
// low there is the one whose falling edge starts phi[m], and phi[m] then
// stays high until the slave window closes.
//
// Timing (r_k master rising edges, stage m pulsing in cycle k):
//   phi_p[m]: rises r_k + D2,       falls r_{k+1} + D0             (critical)
//   phi[m]  : rises r_k + D2 + DA,  falls r_{k+1} + D1 + ds        (rise critical)
//   non-overlap between phi[m] and phi[m+1] = D2 - D1 - ds (+ DA)
// Requires D0 < D1 + ds < D2 and D1 + ds < D2 + DA < D1 + ds + T/2.
//
// The wiring follows the published block diagram; delay values and the
// behavioural delay cells are this design's own. Phase m on index m-1.
`timescale 1ps/1ps
module clkgen_da #(
  parameter int unsigned N     = clkgen_pkg::NPHASE_DEFAULT,
  parameter int unsigned D0_PS = clkgen_pkg::D0_PS,
  parameter int unsigned D1_PS = clkgen_pkg::D1_PS,
  parameter int unsigned D2_PS = clkgen_pkg::D2_PS,
  parameter int unsigned DA_PS = clkgen_pkg::DA_PS
) (
  input  logic         clk,
  output logic [N-1:0] phi,
  output logic [N-1:0] phi_p
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

  for (genvar i = 0; i < N; i++) begin : g_phase
    edb u_edb_pre  (.a(pre_clk),     .b(post_dff_clk),   .c(slave[i]), .out(phi_p[i]));
    edb u_edb_post (.a(master_n[i]), .b(post_dff_clk_d), .c(slave[i]), .out(phi[i]));
  end

endmodule

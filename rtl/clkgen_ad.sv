// clkgen_ad: skew-free N-phase clock generator for A/D conversion
// (edge-driven clocking).
//
// In a time-interleaved sampler the sampling instant of path m is the
// falling edge of its pre-phase phi_p[m]. Here that edge is never produced
// by the ring counter: it is the rising edge of pre-clk, the master clock
// delayed by D0_PS, and the same wire serves every path, so all N sampling
// instants are one period apart regardless of flip-flop mismatch.
//
// Structure (one EDB, out = not(A and B) and not C, per output):
//   pre-clk      = clk delayed D0_PS
//   post-clk     = pre-clk delayed DPRE_PS
//   counter clk  = clk delayed D1_PS, driving the mod-N ring counter
//   phi_p[m] = EDB(A = pre-clk,  B = master[m], C = slave[m])
//   phi[m]   = EDB(A = post-clk, B = master[m], C = slave[m] delayed DA_PS)
// The slave pulse of stage m (low for one period) is the window. Its
// falling edge raises phi_p[m]; the master output, high only in the second
// half of the window, lets the next pre-clk rising edge pull phi_p[m] low
// and keeps the pre-clk edge in the first half from doing so. phi[m] is the
// same with post-clk, so it falls DPRE_PS after phi_p[m], and its rising
// edge is delayed by DA_PS to separate pre- and post-phase rising edges.
//
// Timing, with r_k the k-th master rising edge and stage m pulsing in
// cycle k (ds = clock-to-slave delay, zero in this RTL):
//   phi_p[m]: rises r_k + D1 + ds,      falls r_{k+1} + D0         (critical)
//   phi[m]  : rises r_k + D1 + ds + DA, falls r_{k+1} + D0 + DPRE
//   non-overlap between phi[m] and phi[m+1] = ds + D1 - DPRE - D0 (+ DA)
// Requires D0 + DPRE < D1 + ds and D1 + ds - D0 < T/2.
//
// The wiring and the edge assignment follow the published block diagram;
// the delay values and the choice of modelling delays as behavioural
// transport delays are this design's own. Outputs are active high,
// phase m on index m-1.
`timescale 1ps/1ps
module clkgen_ad #(
  parameter int unsigned N       = clkgen_pkg::NPHASE_DEFAULT,
  parameter int unsigned D0_PS   = clkgen_pkg::D0_PS,
  parameter int unsigned DPRE_PS = clkgen_pkg::DPRE_PS,
  parameter int unsigned D1_PS   = clkgen_pkg::D1_PS,
  parameter int unsigned DA_PS   = clkgen_pkg::DA_PS
) (
  input  logic         clk,
  output logic [N-1:0] phi,
  output logic [N-1:0] phi_p
);

  logic         pre_clk, post_clk, rc_clk;
  logic [N-1:0] master, slave, slave_d;

  delay_line #(.DELAY_PS(D0_PS))   u_d0   (.in(clk),     .out(pre_clk));
  delay_line #(.DELAY_PS(DPRE_PS)) u_dpre (.in(pre_clk), .out(post_clk));
  delay_line #(.DELAY_PS(D1_PS))   u_d1   (.in(clk),     .out(rc_clk));

  ring_counter #(.N(N)) u_ring (
    .clk   (rc_clk),
    .set_n ('1),
    .clr_n ('1),
    .master(master),
    .slave (slave)
  );

  for (genvar i = 0; i < N; i++) begin : g_phase
    delay_line #(.DELAY_PS(DA_PS)) u_da (.in(slave[i]), .out(slave_d[i]));

    edb u_edb_pre  (.a(pre_clk),  .b(master[i]), .c(slave[i]),   .out(phi_p[i]));
    edb u_edb_post (.a(post_clk), .b(master[i]), .c(slave_d[i]), .out(phi[i]));
  end

endmodule

// ring_counter: self-starting mod-N ring counter built from ms_dff_m stages.
//
// N master-slave flip-flops share one clock and pass a single 0 around the
// ring, from stage 1 to stage N and back. Each slave output is therefore a
// negative pulse one clock period wide, repeating every N periods, and stage
// m+1 pulses one period after stage m. These pulses are the envelopes of the
// N non-overlapping clock phases. Each master output carries the same
// pulse half a clock period earlier (it changes on the falling edge).
//
// Self-start: the first stage loads 0 only when stages 1..N-1 all hold 1,
// and 1 otherwise. Surplus zeros are shifted out of the last stage and no
// new one enters while a zero is still in stages 1..N-1, so from any
// power-up state the ring holds exactly one zero after at most N rising
// clock edges. No reset is needed: the generators tie the per-stage
// asynchronous set and clear inputs inactive (high); they are brought out
// so that a test can load any state.
//
// Ports: clk; set_n[m-1], clr_n[m-1] asynchronous active-low set and clear
// of stage m; master[m-1] and slave[m-1] the outputs of stage m
// (m = 1..N), both active low. Outputs change with the clock edges, with no
// delay.
//
// The ring closes through the flip-flops' latches, so lint and synthesis
// tools report latches and a loop through them; every path around the
// ring passes one closed latch in each clock phase, so it is not a
// combinational loop.
//
// The ring of master-output flip-flops and its purpose follow the published
// design; the published example is mod-4 with a gate in front of the
// flip-flop inputs, whose exact self-start logic is not given, so the
// injection rule above is this design's own. Dummy loads that balance the
// M and Q wiring in silicon have no logic function and are omitted.
`timescale 1ps/1ps
module ring_counter #(
  parameter int unsigned N = clkgen_pkg::NPHASE_DEFAULT
) (
  input  logic         clk,
  input  logic [N-1:0] set_n,
  input  logic [N-1:0] clr_n,
  output logic [N-1:0] master,
  output logic [N-1:0] slave
);

  logic [N-1:0] d;

  // Stage 1 injects the zero; the others shift.
  always_comb begin
    d[0] = ~(&slave[N-2:0]);
    for (int i = 1; i < N; i++) d[i] = slave[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    ms_dff_m u_dff (
      .clk  (clk),
      .d    (d[i]),
      .set_n(set_n[i]),
      .clr_n(clr_n[i]),
      .m    (master[i]),
      .q    (slave[i]),
      .q_n  ()
    );
  end

  initial begin
    assert (N >= 2) else $error("ring_counter: N must be at least 2");
  end

endmodule

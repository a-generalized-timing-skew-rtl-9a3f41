// tb_clkgen_platform: end-to-end testbench of the clock generation platform
// with every parameter at its default (four phases, 160 MHz master clock).
//
// The master clock starts with all flip-flops at random values. After the
// ring counters have started by themselves, every output bank is checked
// edge by edge against the positions worked out from the delay values
// (see phase_checker), phi_s is checked every period, and the three
// generators are checked against each other: the A/D sampling edges, the
// D/A pre-phase falling edges and the phi_s falling edges all come from the
// same pre-clk timing and must fall at the same offset. Each mechanism of
// the design is counted and must have happened:
//   self-start of each of the three ring counters,
//   pre-phase falling edges set by pre-clk (A/D sampling instants),
//   post-phase falling edges set by post-clk (A/D),
//   rising edges set by post-DFF-clk (D/A, both phases),
//   phase falling edges enclosed by the phi_s pulse (switching scheme).
`timescale 1ps/1ps
module tb_clkgen_platform;
  import clkgen_pkg::*;

  localparam int unsigned N      = NPHASE_DEFAULT;
  localparam int unsigned T      = TCLK_PS;
  localparam int unsigned CYCLES = 200;
  localparam int unsigned SETTLE = (N + 6) * T;

  logic         clk = 1'b0;
  logic [N-1:0] ad_phi, ad_phi_p, da_phi, da_phi_p, eds_phi;
  logic         eds_phi_s;

  always #(T/2) clk = ~clk;   // rising edges at T/2 + k*T

  clkgen_platform dut (
    .clk      (clk),
    .ad_phi   (ad_phi),
    .ad_phi_p (ad_phi_p),
    .da_phi   (da_phi),
    .da_phi_p (da_phi_p),
    .eds_phi  (eds_phi),
    .eds_phi_s(eds_phi_s)
  );

  int c[5], f[5], r[5], fl[5];

  phase_checker #(.N(N), .RISE_OFF(D1_PS),         .FALL_OFF(D0_PS),           .SETTLE_PS(SETTLE), .NAME("ad_phi_p"))
    chk_ad_p  (.ph(ad_phi_p), .checks(c[0]), .failures(f[0]), .rises(r[0]), .falls(fl[0]));
  phase_checker #(.N(N), .RISE_OFF(D1_PS + DA_PS), .FALL_OFF(D0_PS + DPRE_PS), .SETTLE_PS(SETTLE), .NAME("ad_phi"))
    chk_ad    (.ph(ad_phi),   .checks(c[1]), .failures(f[1]), .rises(r[1]), .falls(fl[1]));
  phase_checker #(.N(N), .RISE_OFF(D2_PS),         .FALL_OFF(D0_PS),           .SETTLE_PS(SETTLE), .NAME("da_phi_p"))
    chk_da_p  (.ph(da_phi_p), .checks(c[2]), .failures(f[2]), .rises(r[2]), .falls(fl[2]));
  phase_checker #(.N(N), .RISE_OFF(D2_PS + DA_PS), .FALL_OFF(D1_PS),           .SETTLE_PS(SETTLE), .NAME("da_phi"))
    chk_da    (.ph(da_phi),   .checks(c[3]), .failures(f[3]), .rises(r[3]), .falls(fl[3]));
  phase_checker #(.N(N), .RISE_OFF(D2_PS),         .FALL_OFF(D1_PS),           .SETTLE_PS(SETTLE), .NAME("eds_phi"))
    chk_eds   (.ph(eds_phi),  .checks(c[4]), .failures(f[4]), .rises(r[4]), .falls(fl[4]));

  int checks = 0, failures = 0;

  function automatic longint offset(longint t);
    return (t - T/2) % T;
  endfunction

  task automatic expect_true(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR at %0t: %s", $time, msg);
    end
  endtask

  // Mechanism counters.
  int n_start_ad = 0, n_start_da = 0, n_start_eds = 0;
  int n_sample_ad = 0, n_post_ad = 0, n_rise_da = 0, n_enclosed = 0;
  int n_phis = 0;

  // Self-start: the first phase-1 pulse after power-up of each generator.
  always @(posedge ad_phi_p[0]) n_start_ad  = (n_start_ad  == 0) ? 1 : n_start_ad;
  always @(posedge da_phi_p[0]) n_start_da  = (n_start_da  == 0) ? 1 : n_start_da;
  always @(posedge eds_phi[0])  n_start_eds = (n_start_eds == 0) ? 1 : n_start_eds;

  // A/D sampling instants: pre-phase falling edges at pre-clk rising edges.
  always @(negedge |ad_phi_p) if ($time >= SETTLE) begin
    n_sample_ad++;
    expect_true(offset($time) == D0_PS, "A/D sampling edge not at pre-clk");
  end
  always @(negedge |ad_phi) if ($time >= SETTLE) begin
    n_post_ad++;
    expect_true(offset($time) == D0_PS + DPRE_PS, "A/D post-phase fall not at post-clk");
  end

  // D/A critical rising edges: post-DFF-clk falling edge (plus DA for the
  // post-phase).
  always @(posedge |da_phi_p) if ($time >= SETTLE) begin
    n_rise_da++;
    expect_true(offset($time) == D2_PS, "D/A pre-phase rise not at post-DFF-clk");
  end

  // Shared pre-clk timing: D/A pre-phase falls with the A/D sampling edge.
  always @(negedge |da_phi_p) if ($time >= SETTLE)
    expect_true(offset($time) == D0_PS, "D/A pre-phase fall not at pre-clk");

  // Switching scheme: phi_s every period, phase falls inside its pulse.
  always @(negedge eds_phi_s) if ($time >= SETTLE) begin
    n_phis++;
    expect_true(offset($time) == D0_PS, "phi_s fall not at pre-clk");
  end
  always @(posedge eds_phi_s) if ($time >= SETTLE)
    expect_true(offset($time) == D2_PS + DA_PS, "phi_s rise misplaced");
  always @(negedge |eds_phi) if ($time >= SETTLE) begin
    expect_true(eds_phi_s === 1'b0, "phase fell outside the phi_s pulse");
    if (eds_phi_s === 1'b0) n_enclosed++;
  end

  task automatic finish_report();
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("mechanisms: self-start ad=%0d da=%0d eds=%0d, A/D sampling edges=%0d, A/D post falls=%0d, D/A rises=%0d, phi_s pulses=%0d, enclosed falls=%0d",
             n_start_ad, n_start_da, n_start_eds, n_sample_ad, n_post_ad, n_rise_da, n_phis, n_enclosed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #(longint'(T) * (CYCLES + 100));
    failures++;
    $display("ERROR: watchdog expired");
    finish_report();
  end

  initial begin
    #(longint'(T) * CYCLES + T/2);
    begin
      automatic int periods = CYCLES - SETTLE / T;
      expect_true(n_start_ad == 1 && n_start_da == 1 && n_start_eds == 1, "a ring counter never started");
      expect_true(n_sample_ad >= periods - 2, $sformatf("only %0d A/D sampling edges", n_sample_ad));
      expect_true(n_post_ad   >= periods - 2, $sformatf("only %0d A/D post-phase falls", n_post_ad));
      expect_true(n_rise_da   >= periods - 2, $sformatf("only %0d D/A rising edges", n_rise_da));
      expect_true(n_phis      >= periods - 2, $sformatf("only %0d phi_s pulses", n_phis));
      expect_true(n_enclosed  >= periods - 2, $sformatf("only %0d enclosed phase falls", n_enclosed));
      for (int i = 0; i < 5; i++)
        expect_true(r[i] >= periods - N - 1 && fl[i] >= periods - N - 1,
                    $sformatf("bank %0d: %0d rises %0d falls", i, r[i], fl[i]));
    end
    finish_report();
  end
endmodule

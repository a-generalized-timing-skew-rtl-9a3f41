// tb_clkgen_ad: self-checking testbench for the A/D clock generator.
//
// A 160 MHz master clock drives three generators: one with every default,
// one with a longer ring-counter clock delay D1 (standing in for slower or
// mismatched flip-flops), and one with five phases. For each, phase_checker
// verifies the edge positions worked out from the delay values:
//   pre-phase  rises D1 after a master rising edge, falls D0 after the next;
//   post-phase rises D1 + DA after it, falls D0 + DPRE after the next;
// the phase order, one pulse per phase every N periods, and non-overlap.
// The sampling edges (pre-phase falling) must be identical in the default
// and the slow-D1 generator: the ring counter timing does not reach them.
`timescale 1ps/1ps
module tb_clkgen_ad;
  import clkgen_pkg::*;

  localparam int unsigned T       = TCLK_PS;
  localparam int unsigned D1_SLOW = 1000;
  localparam int unsigned CYCLES  = 60;
  localparam int unsigned SETTLE  = 10 * T;

  logic       clk = 1'b0;
  logic [3:0] phi_a, phip_a, phi_b, phip_b;
  logic [4:0] phi_c, phip_c;

  always #(T/2) clk = ~clk;   // rising edges at T/2 + k*T

  clkgen_ad                          dut_a (.clk(clk), .phi(phi_a), .phi_p(phip_a));
  clkgen_ad #(.D1_PS(D1_SLOW))       dut_b (.clk(clk), .phi(phi_b), .phi_p(phip_b));
  clkgen_ad #(.N(5))                 dut_c (.clk(clk), .phi(phi_c), .phi_p(phip_c));

  int c[6], f[6], r[6], fl[6];

  phase_checker #(.N(4), .RISE_OFF(D1_PS),         .FALL_OFF(D0_PS),         .SETTLE_PS(SETTLE), .NAME("a.phi_p"))
    chk0 (.ph(phip_a), .checks(c[0]), .failures(f[0]), .rises(r[0]), .falls(fl[0]));
  phase_checker #(.N(4), .RISE_OFF(D1_PS + DA_PS), .FALL_OFF(D0_PS + DPRE_PS), .SETTLE_PS(SETTLE), .NAME("a.phi"))
    chk1 (.ph(phi_a),  .checks(c[1]), .failures(f[1]), .rises(r[1]), .falls(fl[1]));
  phase_checker #(.N(4), .RISE_OFF(D1_SLOW),       .FALL_OFF(D0_PS),         .SETTLE_PS(SETTLE), .NAME("b.phi_p"))
    chk2 (.ph(phip_b), .checks(c[2]), .failures(f[2]), .rises(r[2]), .falls(fl[2]));
  phase_checker #(.N(4), .RISE_OFF(D1_SLOW + DA_PS), .FALL_OFF(D0_PS + DPRE_PS), .SETTLE_PS(SETTLE), .NAME("b.phi"))
    chk3 (.ph(phi_b),  .checks(c[3]), .failures(f[3]), .rises(r[3]), .falls(fl[3]));
  phase_checker #(.N(5), .RISE_OFF(D1_PS),         .FALL_OFF(D0_PS),         .SETTLE_PS(SETTLE), .NAME("c.phi_p"))
    chk4 (.ph(phip_c), .checks(c[4]), .failures(f[4]), .rises(r[4]), .falls(fl[4]));
  phase_checker #(.N(5), .RISE_OFF(D1_PS + DA_PS), .FALL_OFF(D0_PS + DPRE_PS), .SETTLE_PS(SETTLE), .NAME("c.phi"))
    chk5 (.ph(phi_c),  .checks(c[5]), .failures(f[5]), .rises(r[5]), .falls(fl[5]));

  int checks = 0, failures = 0;

  // Pre-phase falling edges (sampling instants) of the default and slow-D1
  // generators must coincide.
  int samp_a = 0, samp_b = 0;
  always @(negedge |phip_a) if ($time >= SETTLE) samp_a++;
  always @(negedge |phip_b) if ($time >= SETTLE) begin
    samp_b++;
    checks++;
    if (((longint'($time) - T/2) % T) != D0_PS) begin
      failures++;
      $display("ERROR: sampling edge of slow-D1 generator at %0t not aligned", $time);
    end
  end

  task automatic finish_report();
    for (int i = 0; i < 6; i++) begin checks += c[i]; failures += f[i]; end
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
    // Pulse counts: each phase once per N periods after settling.
    for (int i = 0; i < 6; i++) begin
      automatic int n = (i < 4) ? 4 : 5;
      automatic int expected = (CYCLES - SETTLE / T) / n * n;
      checks++;
      if (r[i] < expected - n || fl[i] < expected - n) begin
        failures++;
        $display("ERROR: checker %0d saw %0d rises / %0d falls, expected about %0d", i, r[i], fl[i], expected);
      end
    end
    checks++;
    if (samp_a < CYCLES - SETTLE / T - 2 || samp_a != samp_b) begin
      failures++;
      $display("ERROR: %0d / %0d sampling edges", samp_a, samp_b);
    end
    finish_report();
  end
endmodule

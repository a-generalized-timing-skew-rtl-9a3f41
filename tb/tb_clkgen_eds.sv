// tb_clkgen_eds: self-checking testbench for the edge-driven switching
// clock generator.
//
// A 160 MHz master clock drives a default generator, one with a longer
// ring-counter clock delay D1 and a five-phase one. phase_checker verifies
// that each phase rises D2 after a master rising edge and falls D1 after
// the next, in order, without overlap. The common sampling clock phi_s is
// checked directly: in every master period it falls D0 after the rising
// edge and rises again D2 + DA after it. Every phase falling edge must lie
// inside a low pulse of phi_s, which is what makes the common switch, not
// the path phase, decide the sampling instant.
`timescale 1ps/1ps
module tb_clkgen_eds;
  import clkgen_pkg::*;

  localparam int unsigned T       = TCLK_PS;
  localparam int unsigned D1_SLOW = 800;
  localparam int unsigned CYCLES  = 60;
  localparam int unsigned SETTLE  = 10 * T;

  logic       clk = 1'b0;
  logic [3:0] phi_a, phi_b;
  logic [4:0] phi_c;
  logic       phis_a, phis_b, phis_c;

  always #(T/2) clk = ~clk;   // rising edges at T/2 + k*T

  clkgen_eds                    dut_a (.clk(clk), .phi(phi_a), .phi_s(phis_a));
  clkgen_eds #(.D1_PS(D1_SLOW)) dut_b (.clk(clk), .phi(phi_b), .phi_s(phis_b));
  clkgen_eds #(.N(5))           dut_c (.clk(clk), .phi(phi_c), .phi_s(phis_c));

  int c[3], f[3], r[3], fl[3];

  phase_checker #(.N(4), .RISE_OFF(D2_PS), .FALL_OFF(D1_PS),   .SETTLE_PS(SETTLE), .NAME("a.phi"))
    chk0 (.ph(phi_a), .checks(c[0]), .failures(f[0]), .rises(r[0]), .falls(fl[0]));
  phase_checker #(.N(4), .RISE_OFF(D2_PS), .FALL_OFF(D1_SLOW), .SETTLE_PS(SETTLE), .NAME("b.phi"))
    chk1 (.ph(phi_b), .checks(c[1]), .failures(f[1]), .rises(r[1]), .falls(fl[1]));
  phase_checker #(.N(5), .RISE_OFF(D2_PS), .FALL_OFF(D1_PS),   .SETTLE_PS(SETTLE), .NAME("c.phi"))
    chk2 (.ph(phi_c), .checks(c[2]), .failures(f[2]), .rises(r[2]), .falls(fl[2]));

  int checks = 0, failures = 0;
  int phis_falls = 0, phis_rises = 0, enclosed = 0;

  function automatic longint offset(longint t);
    return (t - T/2) % T;
  endfunction

  // phi_s of all three generators: same edges every period.
  logic [2:0] phis;
  assign phis = {phis_c, phis_b, phis_a};
  always begin
    @(phis);
    if ($time >= SETTLE) fork
      begin
        #1;
        checks++;
        if (phis != '0 && phis != '1) begin
          failures++;
          $display("ERROR: phi_s differs between generators at %0t: %b", $time, phis);
        end
      end
    join_none
  end

  always @(negedge phis_a) if ($time >= SETTLE) begin
    phis_falls++;
    checks++;
    if (offset($time) != D0_PS) begin
      failures++; $display("ERROR: phi_s falls at offset %0d", offset($time));
    end
  end

  always @(posedge phis_a) if ($time >= SETTLE) begin
    phis_rises++;
    checks++;
    if (offset($time) != D2_PS + DA_PS) begin
      failures++; $display("ERROR: phi_s rises at offset %0d", offset($time));
    end
  end

  // Every phase falling edge inside the phi_s low pulse.
  always @(negedge |phi_a or negedge |phi_b or negedge |phi_c) if ($time >= SETTLE) begin
    checks++;
    if (phis !== 3'b000) begin
      failures++; $display("ERROR: phase fell at %0t outside the phi_s pulse", $time);
    end else enclosed++;
  end

  task automatic finish_report();
    for (int i = 0; i < 3; i++) begin checks += c[i]; failures += f[i]; end
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
    for (int i = 0; i < 3; i++) begin
      automatic int n = (i < 2) ? 4 : 5;
      automatic int expected = (CYCLES - SETTLE / T) / n * n;
      checks++;
      if (r[i] < expected - n || fl[i] < expected - n) begin
        failures++;
        $display("ERROR: checker %0d saw %0d rises / %0d falls, expected about %0d", i, r[i], fl[i], expected);
      end
    end
    checks++;
    if (phis_falls < CYCLES - SETTLE / T - 1 || phis_rises < CYCLES - SETTLE / T - 1 || enclosed < CYCLES - SETTLE / T - 2) begin
      failures++;
      $display("ERROR: phi_s %0d falls %0d rises, %0d enclosed phase edges", phis_falls, phis_rises, enclosed);
    end
    finish_report();
  end
endmodule

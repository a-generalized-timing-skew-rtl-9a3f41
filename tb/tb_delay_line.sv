// tb_delay_line: self-checking testbench for the behavioural delay cell.
//
// Drives one random input, including pulses much shorter than the delay,
// into a non-inverting 300 ps cell and an inverting 500 ps cell. Every input
// edge is logged by time; every output edge must match an input edge exactly
// DELAY_PS earlier, with the same (or inverted) value, and no input edge may
// be lost (transport, not inertial, delay).
`timescale 1ps/1ps
module tb_delay_line;
  localparam int unsigned DLY_A = 300;
  localparam int unsigned DLY_B = 500;

  logic in, out_a, out_b;
  int   checks = 0, failures = 0;
  int   in_edges = 0, a_edges = 0, b_edges = 0;
  bit   hist [longint];

  delay_line #(.DELAY_PS(DLY_A))                u_a (.in(in), .out(out_a));
  delay_line #(.DELAY_PS(DLY_B), .INVERT(1'b1)) u_b (.in(in), .out(out_b));

  always @(in) begin
    hist[$time] = in;
    if ($time > 0) in_edges++;
  end

  always @(out_a) if ($time > 0) begin
    automatic longint t0 = $time - DLY_A;
    checks++;
    a_edges++;
    if (!hist.exists(t0) || hist[t0] != out_a) begin
      failures++;
      $display("ERROR: out_a edge at %0t has no matching input edge", $time);
    end
  end

  always @(out_b) if ($time > 0) begin
    automatic longint t0 = $time - DLY_B;
    checks++;
    b_edges++;
    if (!hist.exists(t0) || hist[t0] != !out_b) begin
      failures++;
      $display("ERROR: out_b edge at %0t has no matching inverted input edge", $time);
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 1'b0;
    #1000;
    for (int i = 0; i < 400; i++) begin
      #(1 + $urandom_range(0, 900));
      in = ~in;
    end
    #1000;
    checks++;
    if (a_edges != in_edges || b_edges != in_edges) begin
      failures++;
      $display("ERROR: %0d input edges, %0d / %0d output edges", in_edges, a_edges, b_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

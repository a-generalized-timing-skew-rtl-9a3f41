// tb_edb: self-checking testbench for the Edge Decision Block.
//
// Applies all eight input combinations several times in random order and
// compares with the truth table of the AOI stage: the output is high only
// when C is low and A and B are not both high.
`timescale 1ps/1ps
module tb_edb;
  logic a, b, c, out;
  int   checks = 0, failures = 0;

  // Expected output indexed by {c, b, a}.
  localparam bit [7:0] TRUTH = 8'b0000_0111;

  edb dut (.a(a), .b(b), .c(c), .out(out));

  initial begin
    #1_000_000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      automatic int unsigned v = (r < 8) ? r : $urandom_range(0, 7);
      {c, b, a} = v[2:0];
      #10;
      checks++;
      if (out !== TRUTH[v[2:0]]) begin
        failures++;
        $display("ERROR: a=%b b=%b c=%b out=%b expected %b", a, b, c, out, TRUTH[v[2:0]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

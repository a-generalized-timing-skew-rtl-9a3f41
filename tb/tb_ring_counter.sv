// tb_ring_counter: self-checking testbench for the self-starting ring counter.
//
// For N = 4 (the default) and N = 5, every one of the 2^N flip-flop states
// is loaded through the asynchronous set and clear inputs. From each the counter
// must reach a state with exactly one zero within N rising edges, then
// rotate it one stage per clock (stage m to m+1, N back to 1) for two full
// turns, with every master output equal to the next slave state after each
// falling edge (half a period early).
`timescale 1ps/1ps
module tb_ring_counter;
  localparam int unsigned T = 1000;

  logic       clk4 = 1'b0, clk5 = 1'b0;
  logic [3:0] m4, s4;
  logic [4:0] m5, s5;
  int         checks = 0, failures = 0;
  int         self_starts = 0;

  logic [3:0] set4_n = '1, clr4_n = '1;
  logic [4:0] set5_n = '1, clr5_n = '1;

  ring_counter          dut4 (.clk(clk4), .set_n(set4_n), .clr_n(clr4_n), .master(m4), .slave(s4));
  ring_counter #(.N(5)) dut5 (.clk(clk5), .set_n(set5_n), .clr_n(clr5_n), .master(m5), .slave(s5));

  function automatic int zeros(logic [7:0] v, int n);
    int z = 0;
    for (int i = 0; i < n; i++) if (!v[i]) z++;
    return z;
  endfunction

  function automatic logic [7:0] rotate(logic [7:0] v, int n);
    // The single zero moves from stage i to stage i+1 (mod n).
    logic [7:0] r = '1;
    for (int i = 0; i < n; i++) if (!v[i]) r[(i + 1) % n] = 1'b0;
    return r;
  endfunction

  task automatic run(int n, int state);
    logic [7:0] s, m, exp_s;
    int         steps;
    logic [7:0] mask = 8'((1 << n) - 1);
    // Load with clk low: clear the zero stages, set the one stages.
    if (n == 4) begin set4_n = ~state[3:0]; clr4_n = state[3:0]; end
    else        begin set5_n = ~state[4:0]; clr5_n = state[4:0]; end
    #(T/4);
    set4_n = '1; clr4_n = '1; set5_n = '1; clr5_n = '1;
    #(T/4);
    s = (n == 4) ? {4'hf, s4} : {3'h7, s5};
    checks++;
    if (s != (8'(state) | ~mask)) begin
      failures++; $display("ERROR: N=%0d could not load %b", n, state);
    end
    // Run until one zero is left; it must take at most n rising edges.
    steps = 0;
    while (zeros(s, n) != 1 && steps <= n) begin
      #(T/2 - 1); if (n == 4) clk4 = 1'b1; else clk5 = 1'b1;
      #(T/2);     if (n == 4) clk4 = 1'b0; else clk5 = 1'b0;
      #1; steps++;
      s = (n == 4) ? {4'hf, s4} : {3'h7, s5};
    end
    checks++;
    if (zeros(s, n) != 1) begin
      failures++; $display("ERROR: N=%0d from %b not one-cold after %0d clocks", n, state, steps);
    end else self_starts++;
    // Two full turns of rotation with the master leading by half a period.
    for (int k = 0; k < 2 * n; k++) begin
      exp_s = rotate(s, n);
      m = (n == 4) ? {4'hf, m4} : {3'h7, m5};
      checks++;
      if (m != exp_s) begin
        failures++; $display("ERROR: N=%0d master %b expected %b", n, m, exp_s);
      end
      #(T/2 - 1); if (n == 4) clk4 = 1'b1; else clk5 = 1'b1;
      #1;
      s = (n == 4) ? {4'hf, s4} : {3'h7, s5};
      checks++;
      if (s != exp_s) begin
        failures++; $display("ERROR: N=%0d slave %b expected %b", n, s, exp_s);
      end
      #(T/2 - 1); if (n == 4) clk4 = 1'b0; else clk5 = 1'b0;
      #1;
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T);
    for (int st = 0; st < 16; st++) run(4, st);
    for (int st = 0; st < 32; st++) run(5, st);
    checks++;
    if (self_starts != 48) begin
      failures++; $display("ERROR: only %0d of 48 starts converged", self_starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

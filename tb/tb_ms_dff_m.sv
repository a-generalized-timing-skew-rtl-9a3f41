// tb_ms_dff_m: self-checking testbench for the master-slave flip-flop with
// master output.
//
// Random D changes are made in both clock phases. A reference model kept in
// the testbench says: the master follows D while CLK is low and holds while
// CLK is high; Q takes the master value while CLK is high; Q_N = not Q.
// Asynchronous clear and set are exercised in both clock phases. The check
// that matters for the ring counter is also made directly: when D changes
// only while CLK is high, M changes at the falling edge and Q at the
// following rising edge, half a period later.
`timescale 1ps/1ps
module tb_ms_dff_m;
  localparam int unsigned T = 1000;

  logic clk = 1'b0, d = 1'b0, set_n = 1'b1, clr_n = 1'b1;
  logic m, q, q_n;
  logic ref_m, ref_q;
  int   checks = 0, failures = 0;
  int   m_fall_edges = 0;

  ms_dff_m dut (.clk(clk), .d(d), .set_n(set_n), .clr_n(clr_n), .m(m), .q(q), .q_n(q_n));

  task automatic compare(string what);
    checks++;
    if (m !== ref_m || q !== ref_q || q_n !== !ref_q) begin
      failures++;
      $display("ERROR %s at %0t: m=%b q=%b q_n=%b expected m=%b q=%b",
               what, $time, m, q, q_n, ref_m, ref_q);
    end
  endtask

  // Reference: updates whenever any input settles.
  task automatic model();
    if (!clr_n)      begin ref_m = 1'b0; ref_q = 1'b0; end
    else if (!set_n) begin ref_m = 1'b1; ref_q = 1'b1; end
    else begin
      if (!clk) ref_m = d;
      if (clk)  ref_q = ref_m;
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Clear first so that both latches start known.
    clr_n = 1'b0; #10; model(); compare("clear"); clr_n = 1'b1; #10; model(); compare("release");

    // Random stimulus: D changes in either phase.
    for (int i = 0; i < 300; i++) begin
      #(T/4); d = 1'(($urandom) & 1); #1; model(); compare("d change");
      #(T/4); clk = ~clk;             #1; model(); compare("clk edge");
      if ($urandom_range(0, 19) == 0) begin
        if ($urandom & 1) clr_n = 1'b0; else set_n = 1'b0;
        #1; model(); compare("async");
        clr_n = 1'b1; set_n = 1'b1;
        #1; model(); compare("async release");
      end
    end

    // Half-period lead of M over Q when D moves only while CLK is high.
    clr_n = 1'b0; #1; clr_n = 1'b1; clk = 1'b0; #(T/2);
    for (int i = 0; i < 20; i++) begin
      time t_m, t_q;
      clk = 1'b1; #(T/8); d = ~d;           // D moves after the rising edge
      #(3*T/8); clk = 1'b0; #1;             // falling edge: M must follow now
      checks++;
      if (m !== d || q === d) begin failures++; $display("ERROR: M did not lead Q at %0t", $time); end
      m_fall_edges++;
      t_m = $time - 1;
      #(T/2 - 1); clk = 1'b1; #1;           // rising edge: Q must follow now
      t_q = $time - 1;
      checks++;
      if (q !== d || (t_q - t_m) != T/2) begin failures++; $display("ERROR: Q did not follow at %0t", $time); end
      clk = 1'b1; #(T/2 - 1); clk = 1'b0; #(T/2);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

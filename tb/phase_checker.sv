// phase_checker: edge-timing monitor for a bank of N clock phases.
//
// Watches an N-bit phase vector produced from a master clock with period
// T_PS whose rising edges fall at T0_PS + k*T_PS. After SETTLE_PS it checks:
//   - every rising edge lies RISE_OFF ps after a master rising edge;
//   - every falling edge lies FALL_OFF ps after a master rising edge, and
//     the pulse is T_PS + FALL_OFF - RISE_OFF wide (falls in the next
//     master period);
//   - phases rise in order 1, 2, ..., N, 1, ... one master period apart;
//   - at most one phase is high at any time (non-overlap), sampled 1 ps
//     after each change.
// The counters are outputs so the enclosing testbench can add them up.
`timescale 1ps/1ps
module phase_checker #(
  parameter int unsigned N         = 4,
  parameter int unsigned T_PS      = 6250,
  parameter int unsigned T0_PS     = 3125,
  parameter int unsigned RISE_OFF  = 600,
  parameter int unsigned FALL_OFF  = 200,
  parameter int unsigned SETTLE_PS = 50000,
  parameter string       NAME      = "phi"
) (
  input  logic [N-1:0] ph,
  output int           checks,
  output int           failures,
  output int           rises,
  output int           falls
);

  logic [N-1:0] prev;
  longint       rise_t [N];
  longint       last_rise_t = -1;
  int           last_phase  = -1;

  initial begin
    checks = 0; failures = 0; rises = 0; falls = 0;
    for (int i = 0; i < N; i++) rise_t[i] = -1;
  end

  function automatic longint offset(longint t);
    return (t - longint'(T0_PS)) % longint'(T_PS);
  endfunction

  task automatic expect_true(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s at %0t: %s", NAME, $time, msg);
    end
  endtask

  always begin
    automatic longint t;
    @(ph);
    t = $time;
    if (t >= SETTLE_PS) begin
      for (int i = 0; i < N; i++) begin
        if (ph[i] && !prev[i]) begin
          expect_true(offset(t) == RISE_OFF % T_PS,
                      $sformatf("phase %0d rises at offset %0d, expected %0d", i + 1, offset(t), RISE_OFF));
          if (last_phase >= 0) begin
            expect_true(i == (last_phase + 1) % N,
                        $sformatf("phase %0d rose after phase %0d", i + 1, last_phase + 1));
            expect_true(t - last_rise_t == T_PS,
                        $sformatf("rise spacing %0d ps", t - last_rise_t));
          end
          last_phase  = i;
          last_rise_t = t;
          rise_t[i]   = t;
          rises++;
        end
        if (!ph[i] && prev[i]) begin
          expect_true(offset(t) == FALL_OFF % T_PS,
                      $sformatf("phase %0d falls at offset %0d, expected %0d", i + 1, offset(t), FALL_OFF));
          if (rise_t[i] >= 0)
            expect_true(t - rise_t[i] == longint'(T_PS) + FALL_OFF - RISE_OFF,
                        $sformatf("phase %0d pulse width %0d ps", i + 1, t - rise_t[i]));
          falls++;
        end
      end
      fork
        begin
          #1;
          expect_true($countones(ph) <= 1, $sformatf("phases overlap: %b", ph));
        end
      join_none
    end
    prev = ph;
  end

endmodule

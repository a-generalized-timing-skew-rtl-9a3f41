// delay_line: behavioural model of a fixed analog delay element.
//
// This is a behavioural model, not synthesizable logic. The clock
// generators derive their reference clocks (pre-clk, post-clk,
// post-DFF-clk, the ring-counter clock) and the pre/post rising-edge
// spacing from delay cells whose value is set by the circuit, not by logic.
// Here each is a transport delay: every edge on `in` appears on `out`
// exactly DELAY_PS picoseconds later, however short the pulse, optionally
// inverted (INVERT = 1 models the inverting d2 cell). A zero delay passes
// the input straight through.
//
// `out` is undefined until the first input edge has propagated.
`timescale 1ps/1ps
module delay_line #(
  parameter int unsigned DELAY_PS = 100,
  parameter bit          INVERT   = 1'b0
) (
  input  logic in,
  output logic out
);

  // Each input edge schedules its own output update, so pending edges are
  // never cancelled by later ones.
  always begin
    @(in);
    fork
      begin
        automatic logic v = in ^ INVERT;
        #(DELAY_PS) out = v;
      end
    join_none
  end

endmodule

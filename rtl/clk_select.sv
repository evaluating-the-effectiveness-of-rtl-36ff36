// clk_select: chip clock selector.
//
// Chooses the clock of all scan flip-flops and signature registers:
// cs=1 passes the fast double pulse of the on-chip variable clock
// generator, cs=0 the slow tester clock tck (scan shift, vector reload,
// signature read-out). The tester changes cs only while both clocks are
// low, so a plain multiplexer suffices; a glitch-free switch is not
// needed under that rule. The selection function follows the document,
// the switching rule is this design's.
module clk_select (
  input  logic cs,      // 1: fast clock, 0: tester clock
  input  logic tck,     // slow tester clock
  input  logic fclk,    // fast double pulse from the VCG
  output logic clk      // chip clock
);

  always_comb clk = cs ? fclk : tck;

endmodule

// meas_scan_ff: scan flip-flop for on-chip path delay measurement.
//
// A D flip-flop preceded by two 2:1 multiplexers. The upper multiplexer,
// steered by se1, chooses between the scan input si (se1=1) and the bit
// held in the flip-flop's extra latch (se1=0). The lower multiplexer,
// steered by se0, chooses between the functional input d (se0=0) and the
// upper multiplexer (se0=1). So:
//   se0=0          normal operation, q <= d
//   se0=1, se1=1   scan shift,       q <= si
//   se0=1, se1=0   vector reload,    q <= latch
// The output q is both the functional output Q and the scan output so.
// All transfers happen on the rising edge of clk; the multiplexer
// structure and the mode table follow the document. The asynchronous,
// active-high reset to 0 is this design's choice (the document only says
// the chip has a reset line for the flip-flops).
module meas_scan_ff (
  input  logic clk,
  input  logic rst,     // asynchronous, active high
  input  logic d,       // functional input
  input  logic si,      // scan input (so of the previous flip-flop)
  input  logic latch,   // bit stored in the extra latch
  input  logic se0,     // 0: functional, 1: scan/latch path
  input  logic se1,     // 1: scan input, 0: latch
  output logic q        // functional output and scan output so
);

  logic upper_mux;
  logic next_q;

  always_comb begin
    upper_mux = se1 ? si : latch;
    next_q    = se0 ? upper_mux : d;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= next_q;
  end

endmodule

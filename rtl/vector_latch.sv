// vector_latch: extra latch that keeps one bit of a test vector.
//
// Level-sensitive storage: while the enable lk is high the latch is
// transparent and follows d (the output of its scan flip-flop); when lk
// falls it holds the last value. The stored bit feeds the latch input of
// the scan flip-flop, so a test vector that was scanned in once can be
// reloaded into the flip-flops in a single clock as often as needed,
// without repeating the scan-in.
// The document names these latches and their common control line; that
// the element is a plain D latch enabled high is this design's reading.
// The latch inferred here is intended: it is the storage element the
// architecture calls for. (Verilator's lint may report that it finds no
// latch in this block when the enable path is simple; synthesis infers
// one latch bit.) The latch has no reset; it is always written
// (lk pulse) before it is read.
module vector_latch (
  input  logic lk,   // latch enable, transparent while high
  input  logic d,    // bit to store (scan flip-flop output)
  output logic q     // stored bit
);

  always_latch begin
    if (lk) q = d;
  end

endmodule

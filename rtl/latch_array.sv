// latch_array: the extra test-vector latches of the whole chip, with
// optional sharing of one latch by several flip-flops.
//
// Each scan flip-flop f has a latch line latch_line[f] that its reload
// multiplexer reads. LATCH_OWNER[f] says where that line comes from:
//   0      flip-flop f owns a latch; the latch stores ff_q[f] while lk=1
//          and drives latch_line[f].
//   k > 0  flip-flop f has no latch of its own and reads the latch owned
//          by flip-flop k-1 (which must itself have LATCH_OWNER = 0).
// The number of latches built is the number of zero entries. With the
// default (all zero) every flip-flop has its own latch, the configuration
// used to explain the method. Sharing is legal when, in every test vector
// applied while the latches are in use, the sharing flip-flops need the
// same bit; choosing the groups (from the test set, within a routing
// window) is done before the chip is built, and the result is given here
// as LATCH_OWNER. The latches are level sensitive, transparent while lk=1.
// Sharing and the three kinds of connections follow the document; the
// encoding of the map is this design's.
module latch_array #(
  parameter int unsigned                  NFF         = 12,
  parameter logic [NFF-1:0][15:0]         LATCH_OWNER = '0
) (
  input  logic           lk,          // latch enable
  input  logic [NFF-1:0] ff_q,        // flip-flop outputs
  output logic [NFF-1:0] latch_line   // bit reloaded into each flip-flop
);

  logic [NFF-1:0] own_q;

  for (genvar f = 0; f < int'(NFF); f++) begin : g_ff
    if (LATCH_OWNER[f] == 16'd0) begin : g_own
      vector_latch u_latch (
        .lk (lk),
        .d  (ff_q[f]),
        .q  (own_q[f])
      );
      assign latch_line[f] = own_q[f];
    end else begin : g_shared
      // no latch here; the owner's latch drives this line
      assign own_q[f]      = 1'b0;
      assign latch_line[f] = own_q[LATCH_OWNER[f] - 16'd1];
    end
  end

  // The map must point at flip-flops that own a latch.
  for (genvar f = 0; f < int'(NFF); f++) begin : g_map_check
    if (LATCH_OWNER[f] != 16'd0) begin : g_chk
      if (int'(LATCH_OWNER[f]) > int'(NFF) || LATCH_OWNER[LATCH_OWNER[f] - 16'd1] != 16'd0) begin : g_bad
        $error("latch_array: flip-flop %0d points at a flip-flop without a latch", f);
      end
    end
  end

endmodule

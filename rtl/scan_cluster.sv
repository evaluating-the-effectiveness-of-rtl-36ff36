// scan_cluster: one cluster of measurement scan flip-flops.
//
// N meas_scan_ff cells chained head (position 0) to tail (position N-1):
// si feeds cell 0, cell j's output feeds the scan input of cell j+1, and
// the tail output is the cluster's scan output so. In the full chip so
// goes to the head of the next cluster and to the input of the cluster's
// signature register. The cells share clk, reset and se0/se1; each reads
// its own latch line latch_line[j], driven by the extra latches
// (latch_array), which may be shared between flip-flops.
// A test response captured in cell k reaches the tail after N-1-k shift
// clocks, so the signature register samples it on shift clock N-k.
// Cluster structure follows the document; the default of three cells is
// the size of the document's own cluster implementation.
module scan_cluster #(
  parameter int unsigned N = 3   // flip-flops per cluster
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         se0,
  input  logic         se1,
  input  logic         si,      // scan input of the head cell
  input  logic [N-1:0] d,       // functional inputs, index = position j
  input  logic [N-1:0] latch_line, // stored vector bits, index = position j
  output logic [N-1:0] q,       // functional outputs
  output logic         so       // tail output
);

  logic [N-1:0] scan_in;

  always_comb begin
    scan_in[0] = si;
    for (int j = 1; j < int'(N); j++) scan_in[j] = q[j-1];
  end

  for (genvar j = 0; j < int'(N); j++) begin : g_cell
    meas_scan_ff u_ff (
      .clk   (clk),
      .rst   (rst),
      .d     (d[j]),
      .si    (scan_in[j]),
      .latch (latch_line[j]),
      .se0   (se0),
      .se1   (se1),
      .q     (q[j])
    );
  end

  assign so = q[N-1];

endmodule

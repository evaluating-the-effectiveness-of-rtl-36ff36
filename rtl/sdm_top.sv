// sdm_top: chip-side delay measurement architecture with signature
// analysis.
//
// The chip's NFF flip-flops are measurement scan flip-flops grouped into
// M = ceil(NFF/N) clusters of N cells; the last cluster holds the
// remaining NFF - (M-1)*N cells. Each flip-flop can reload a stored test
// vector bit from an extra latch (latch_array): by default every
// flip-flop has its own latch, and LATCH_OWNER lets several flip-flops
// share one. The clusters form one scan chain
// (sci -> cluster 0 head ... cluster M-1 tail -> sco). The tail of
// cluster i also feeds signature register SIG_i, so the response of any
// path ending in cluster i can be compacted by SIG_i; the M registers run
// in parallel and up to M paths are measured at once. In shift mode
// (sge=0) the registers form one read-out chain
// SIG_0 -> SIG_1 -> ... -> SIG_M-1 -> sgo. The capture enables sck of the
// registers come from bcd_decoder slices of SLICE enables each, driven by
// the encoded tester lines scj. All storage is clocked by clk, chosen by
// cs between the slow tester clock tck and the double pulse of the
// on-chip variable clock generator (vcg), whose clock width is cnt
// periods of ref_clk.
//
// Flip-flop (i,j) = cluster i, position j, is bit i*N+j of func_d/func_q.
// The logic whose path delays are measured is outside this module: it
// drives func_d from func_q.
//
// One clock-width step of a measurement, as the tester drives it:
//   1. cs=0, {se0,se1}=10, one tck: reload the vector from the latches.
//   2. se0=0, cs=1, rising trg: launch pulse, then capture pulse cnt
//      reference periods later.
//   3. cs=0, {se0,se1}=11, N tck shifts; on shift c, scj selects in each
//      slice the register whose target flip-flop is at position S-c of
//      its cluster of S cells.
// That is 1+N tester clocks per step, against a full scan-in and
// scan-out of NFF bits with a standard scan chain.
// Signature registers are cleared by rst_sig, flip-flops and the VCG by
// rst_ff (both asynchronous, active high). The latches load while lk=1.
//
// Following the document: the scan cell, the extra latches and their
// sharing, the cluster/chain/SIG wiring with a short last cluster, the
// decoder, the cs clock selection, the two reset lines and the 8-bit
// signature length. This design's own: the flip-flop count and slice
// width (the document gives none for its main design), the SIG read-out
// chain order, the digital VCG and the tie-off of the first register's
// shift input.
module sdm_top #(
  parameter int unsigned  NFF     = 12,  // scan flip-flops in the chip
  parameter int unsigned  N       = 3,   // scan flip-flops per cluster
  parameter int unsigned  SIG_LEN = sdm_pkg::SIG_LEN_DEFAULT,
  parameter logic [SIG_LEN-1:0] SIG_POLY = SIG_LEN'(sdm_pkg::SIG_POLY8),
  parameter int unsigned  SLICE   = 2,   // capture enables per decoder
  parameter int unsigned  CNT_W   = 8,   // VCG clock-width control bits
  // latch sharing map, see latch_array (all zero: one latch per flip-flop)
  parameter logic [NFF-1:0][15:0] LATCH_OWNER = '0,
  localparam int unsigned M       = (NFF + N - 1) / N,   // clusters = SIGs
  localparam int unsigned N_LAST  = NFF - (M - 1) * N,   // last cluster size
  localparam int unsigned NSLICE  = (M + SLICE - 1) / SLICE,
  localparam int unsigned ENC_W   = $clog2(SLICE + 1)
) (
  // clocks and resets
  input  logic                         tck,      // slow tester clock
  input  logic                         ref_clk,  // VCG reference clock
  input  logic                         rst_ff,   // flip-flops and VCG
  input  logic                         rst_sig,  // signature registers
  // clock generation
  input  logic                         cs,       // 1: VCG pulse, 0: tck
  input  logic                         trg,      // VCG trigger
  input  logic [CNT_W-1:0]             cnt,      // VCG clock width
  // scan and latches
  input  logic                         se0,
  input  logic                         se1,
  input  logic                         lk,       // latch enable
  input  logic                         sci,      // scan input
  output logic                         sco,      // scan output
  // signature registers
  input  logic                         sge,      // 1: signature, 0: shift
  input  logic [NSLICE-1:0][ENC_W-1:0] scj,      // encoded capture enables
  output logic                         sgo,      // signature read-out
  // circuit under test
  input  logic [NFF-1:0]               func_d,   // flip-flop D inputs
  output logic [NFF-1:0]               func_q    // flip-flop Q outputs
);

  logic                     clk;
  logic                     vcg_pulse;
  logic [M-1:0]             tail;
  logic [M-1:0]             chain_in;
  logic [M-1:0]             sig_out;
  logic [M-1:0]             sig_in;
  logic [NSLICE*SLICE-1:0]  sck;
  logic [NFF-1:0]           latch_line;

  latch_array #(.NFF(NFF), .LATCH_OWNER(LATCH_OWNER)) u_latches (
    .lk         (lk),
    .ff_q       (func_q),
    .latch_line (latch_line)
  );

  vcg #(.CNT_W(CNT_W)) u_vcg (
    .ref_clk (ref_clk),
    .rst     (rst_ff),
    .trg     (trg),
    .cnt     (cnt),
    .pulse   (vcg_pulse)
  );

  clk_select u_clk_select (
    .cs   (cs),
    .tck  (tck),
    .fclk (vcg_pulse),
    .clk  (clk)
  );

  for (genvar s = 0; s < int'(NSLICE); s++) begin : g_dec
    bcd_decoder #(.N(SLICE), .ENC_W(ENC_W)) u_dec (
      .scj (scj[s]),
      .sck (sck[s*SLICE +: SLICE])
    );
  end

  always_comb begin
    chain_in[0] = sci;
    sig_in[0]   = 1'b0;
    for (int i = 1; i < int'(M); i++) begin
      chain_in[i] = tail[i-1];
      sig_in[i]   = sig_out[i-1];
    end
  end

  for (genvar i = 0; i < int'(M); i++) begin : g_cl
    localparam int unsigned S = (i == int'(M) - 1) ? N_LAST : N;  // cells
    scan_cluster #(.N(S)) u_cluster (
      .clk        (clk),
      .rst        (rst_ff),
      .se0        (se0),
      .se1        (se1),
      .si         (chain_in[i]),
      .d          (func_d[i*N +: S]),
      .latch_line (latch_line[i*N +: S]),
      .q          (func_q[i*N +: S]),
      .so         (tail[i])
    );
    sig_reg #(.LEN(SIG_LEN), .POLY(SIG_POLY)) u_sig (
      .clk (clk),
      .rst (rst_sig),
      .sge (sge),
      .sck (sck[i]),
      .in  (tail[i]),
      .sgi (sig_in[i]),
      .sgo (sig_out[i])
    );
  end

  assign sco = tail[M-1];
  assign sgo = sig_out[M-1];

endmodule

// vcg: variable clock generator (2-pulse generator).
//
// Produces the launch/capture double pulse of a delay test. A rising edge
// on trg (asynchronous to ref_clk) is synchronised by two flip-flops and
// detected with a third. On the reference edge that detects it the output
// rises for the first pulse (launch); the rising edge of the second pulse
// (capture) comes exactly W reference periods later, with
// W = max(cnt, VCG_MIN_CNT). Each pulse is one reference period high, so
// the clock width under test is T = W * Tref and the measurement
// resolution is one reference period. Lowering cnt by one shortens the
// test clock by one resolution step. trg must fall and rise again for the
// next double pulse; a trg edge while a pulse pair is running is ignored.
// Latency from trg to the first pulse: 3 reference edges.
//
// The document's generator is an analog phase-interpolator design with
// picosecond steps; this digital counter version follows the document's
// own programmable-logic implementation (three flip-flops at the trigger,
// a selection and a decoding stage). Counter form, pulse width and the
// minimum spacing are this design's choices.
module vcg #(
  parameter int unsigned CNT_W = 8    // width of the clock-width control cnt
) (
  input  logic             ref_clk,  // fast reference clock, sets resolution
  input  logic             rst,      // asynchronous, active high
  input  logic             trg,      // trigger, rising edge starts a pair
  input  logic [CNT_W-1:0] cnt,      // clock width in reference periods
  output logic             pulse     // double pulse output
);

  logic             trg_s1, trg_s2, trg_s3;
  logic             trg_rise;
  logic             active;
  logic [CNT_W-1:0] remain;
  logic [CNT_W-1:0] width;

  always_comb begin
    trg_rise = trg_s2 & ~trg_s3;
    width    = (cnt < CNT_W'(sdm_pkg::VCG_MIN_CNT)) ? CNT_W'(sdm_pkg::VCG_MIN_CNT) : cnt;
  end

  always_ff @(posedge ref_clk or posedge rst) begin
    if (rst) begin
      trg_s1 <= 1'b0;
      trg_s2 <= 1'b0;
      trg_s3 <= 1'b0;
      active <= 1'b0;
      remain <= '0;
      pulse  <= 1'b0;
    end else begin
      trg_s1 <= trg;
      trg_s2 <= trg_s1;
      trg_s3 <= trg_s2;
      pulse  <= 1'b0;
      if (active) begin
        if (remain == CNT_W'(1)) begin
          pulse  <= 1'b1;          // capture pulse
          active <= 1'b0;
        end else begin
          remain <= remain - 1'b1;
        end
      end else if (trg_rise) begin
        pulse  <= 1'b1;            // launch pulse
        active <= 1'b1;
        remain <= width;
      end
    end
  end

endmodule

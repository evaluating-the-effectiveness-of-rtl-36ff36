// sig_reg: reconfigurable single-input signature register.
//
// An LFSR of LEN flip-flops with one serial input, switchable between two
// configurations by sge:
//   sge=1  signature mode. On a rising clk edge with sck=1 the register
//          compacts the bit on 'in' (the tail of its scan cluster):
//          s <= {s[LEN-2:0], in} ^ (s[LEN-1] ? POLY : 0)
//          (internal-XOR LFSR, POLY = coefficients of x^0..x^(LEN-1),
//          x^LEN implied). With sck=0 it holds, so the tester picks the
//          exact clock at which the target response passes the tail.
//   sge=0  shift mode. Every rising clk edge shifts s <= {s[LEN-2:0], sgi};
//          sgo = s[LEN-1]. Registers are chained sgo -> sgi so the tester
//          reads all signatures out on one pin.
// rst clears the register asynchronously (active high).
// The two modes, the sck capture control and the port names follow the
// document. The internal-XOR form, the polynomial, shifting in shift mode
// regardless of sck, and the reset style are this design's choices.
module sig_reg #(
  parameter int unsigned      LEN  = sdm_pkg::SIG_LEN_DEFAULT,
  parameter logic [LEN-1:0]   POLY = LEN'(sdm_pkg::SIG_POLY8)
) (
  input  logic clk,
  input  logic rst,   // asynchronous, active high
  input  logic sge,   // 1: signature register, 0: shift register
  input  logic sck,   // capture enable in signature mode
  input  logic in,    // test response input
  input  logic sgi,   // shift input
  output logic sgo    // shift output (MSB)
);

  logic [LEN-1:0] s;
  logic [LEN-1:0] next_s;
  logic           update;

  always_comb begin
    if (sge) begin
      next_s = {s[LEN-2:0], in} ^ (s[LEN-1] ? POLY : '0);
      update = sck;
    end else begin
      next_s = {s[LEN-2:0], sgi};
      update = 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         s <= '0;
    else if (update) s <= next_s;
  end

  assign sgo = s[LEN-1];

endmodule

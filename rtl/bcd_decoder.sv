// bcd_decoder: decoder for the signature-register capture enables.
//
// Saves tester channels: instead of one chip input per signature
// register, each slice of N capture enables sck is driven by an encoded
// value scj of ENC_W bits. Only one enable of a slice may be high in a
// clock (the test-generation constraint the scheme imposes), so a binary
// code is enough:
//   scj = 0        no register of the slice captures
//   scj = k (1..N) sck[k-1] = 1, all others 0
//   scj > N        no register captures
// Purely combinational.
// The document gives the decoder's job and the one-hot restriction and
// sizes the code at ceil(log2 N) bits; this design reserves code 0 for
// "no capture", which every clock without a target needs, and therefore
// uses ceil(log2(N+1)) bits.
module bcd_decoder #(
  parameter int unsigned N     = 2,                // enables per slice
  parameter int unsigned ENC_W = $clog2(N + 1)     // code width
) (
  input  logic [ENC_W-1:0] scj,
  output logic [N-1:0]     sck
);

  always_comb begin
    for (int k = 0; k < int'(N); k++)
      sck[k] = (int'(scj) == k + 1);
  end

endmodule

// acdma_encoder - ACDMA spreading encoder of one TX port.
//
// The whole W-bit word is spread with a single chip: every data bit goes
// through its own XOR gate with the current spreading chip, so the word
// leaves unchanged for chip 0 (bipolar +1) and inverted for chip 1
// (bipolar -1). The inverted word is the one's complement of the data; the
// "+1" that turns it into the two's-complement negative is not added here but
// by the channel adder, which receives the same chip as a carry input. This
// split (W XOR gates here, chips fed to the adder) follows the document's
// encoder and adder figures.
//
// Interface: data_i is a W-bit two's-complement word, chip_i the spreading
// chip, enc_o the encoded word. Purely combinational, no latency.
module acdma_encoder #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] data_i,
  input  logic         chip_i,
  output logic [W-1:0] enc_o
);

  always_comb begin
    for (int b = 0; b < W; b++) enc_o[b] = data_i[b] ^ chip_i;
  end

endmodule

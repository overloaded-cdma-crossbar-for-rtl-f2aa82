// oci_hybrid_encoder - spreading encoder of one bit slice of an OCI port.
//
// The encoder serves both kinds of port of the overloaded crossbar. For an
// orthogonal (CDMA) port the data bit is XORed with the Walsh chip; for a
// TDMA port it is ANDed with the time-slot chip, so the port adds its bit
// only in its own slot. A multiplexer steered by the port's configured mode
// picks one of the two. The structure (an orthogonal path, a TDMA path and a
// mux) follows the document's encoder figure; the XOR comes from the
// document's description of CDMA spreading, the AND is this design's
// reading of the TDMA path.
//
// Interface: data_i one data bit, chip_i the current chip of the port's
// code, mode_i the port's spreading mode; spread_o the bit put on the
// channel. Combinational.
module oci_hybrid_encoder
  import cdma_pkg::*;
(
  input  logic         data_i,
  input  logic         chip_i,
  input  spread_mode_e mode_i,
  output logic         spread_o
);

  logic orth, tdma;

  assign orth     = data_i ^ chip_i;
  assign tdma     = data_i & chip_i;
  assign spread_o = (mode_i == SPREAD_TDMA) ? tdma : orth;

endmodule

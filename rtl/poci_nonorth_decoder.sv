// poci_nonorth_decoder - decoder of one bit slice of a TDMA port of the
// parallel overloaded crossbar (P-OCI).
//
// The parallel counterpart of oci_nonorth_decoder: bit 0 of the channel
// count of chip 0 and bit 0 of the count of the port's own slot arrive in
// the same cycle, and their XOR, corrected by chip SLOT of Walsh code
// code_x_i (the XOR of the Walsh code indices in use), is the port's bit.
// The two bus taps follow the document's P-OCI overloaded-decoder figure;
// the parity argument and the correction are this design's reconstruction.
//
// Interface: lsb0_i / lsbs_i bit 0 of the counts of chip 0 and of chip SLOT.
// Timing: data_o and valid_o are registered, one cycle after the counts.
module poci_nonorth_decoder
  import cdma_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned SLOT = 1,
  localparam int unsigned L = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lsb0_i,
  input  logic         lsbs_i,
  input  logic [L-1:0] code_x_i,
  input  logic         act_i,
  output logic         data_o,
  output logic         valid_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_o  <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      data_o  <= lsb0_i ^ lsbs_i ^ walsh_chip(32'(code_x_i), SLOT);
      valid_o <= act_i;
    end
  end

  initial assert (SLOT >= 1 && SLOT < N)
    else $error("poci_nonorth_decoder: SLOT must be in 1..N-1");

endmodule

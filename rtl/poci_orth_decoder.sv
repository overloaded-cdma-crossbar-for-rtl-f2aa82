// poci_orth_decoder - decoder of one bit slice of an orthogonal port of the
// parallel overloaded crossbar (P-OCI).
//
// In the parallel variant all N chips of a frame arrive in the same cycle,
// one channel count per chip. The decoder multiplies each count by its
// despreading chip (+/- units: keep it for chip +1, negate it for -1), adds
// the N products in one adder tree, and takes the sign: a sum >= 0 means a 1
// was sent (the same margin argument as the serial decoder, oci_orth_decoder).
// The +/- units, despreading code generator and adder tree follow the
// document's P-OCI orthogonal decoder figure; the output register and the
// valid flag are this design's.
//
// Interface: sums_i the N channel counts of one cycle, act_i "a word for
// this port is in this cycle". Timing: data_o and valid_o are registered,
// one cycle after the counts.
module poci_orth_decoder
  import cdma_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned SW   = 4,
  parameter int unsigned CODE = 1,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned AW = SW + L + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][SW-1:0]  sums_i,
  input  logic                  act_i,
  output logic                  data_o,
  output logic                  valid_o
);

  logic signed [AW-1:0] corr;

  always_comb begin
    corr = '0;
    for (int unsigned j = 0; j < N; j++)
      corr += walsh_chip(CODE, j) ? -AW'(sums_i[j]) : AW'(sums_i[j]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_o  <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      data_o  <= !corr[AW-1];
      valid_o <= act_i;
    end
  end

endmodule

// oci_orth_decoder - decoder of one bit slice of an orthogonal OCI port.
//
// An adder/subtractor and a register form an accumulator over the N chips of
// a frame: the unipolar channel count is added when the despreading chip is
// +1 (chip bit 0) and subtracted when it is -1. The counter input restarts
// the accumulation every N cycles. With unipolar XOR spreading, the
// accumulator ends at +N/2 for a sent 1 and -N/2 for a sent 0; the other
// orthogonal ports add nothing, and the TDMA ports' bits shift it by
// -N/2..N/2-1. It is therefore >= 0 exactly when a 1 was sent, and the
// decoder outputs the inverted sign bit. Structure (adder/subtractor,
// register, counter reset every N cycles, sign-bit output) follows the
// document's orthogonal-decoder figure; the margin argument and widths are
// this design's.
//
// Interface: sum_i channel count, chip_i despreading chip, cnt_i chip index
// of sum_i, act_i "a word for this port is in this frame". Timing: data_o
// and a one-cycle valid_o are loaded on the edge that takes chip N-1.
module oci_orth_decoder #(
  parameter int unsigned N  = 8,
  parameter int unsigned SW = 4,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned AW = SW + L + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] sum_i,
  input  logic          chip_i,
  input  logic [L-1:0]  cnt_i,
  input  logic          act_i,
  output logic          data_o,
  output logic          valid_o
);

  logic signed [AW-1:0] acc_q, base, res;

  always_comb begin
    base = (cnt_i == '0) ? '0 : acc_q;
    res  = chip_i ? base - AW'(sum_i) : base + AW'(sum_i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q   <= '0;
      data_o  <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      acc_q   <= res;
      valid_o <= 1'b0;
      if (cnt_i == L'(N - 1)) begin
        data_o  <= !res[AW-1];
        valid_o <= act_i;
      end
    end
  end

endmodule

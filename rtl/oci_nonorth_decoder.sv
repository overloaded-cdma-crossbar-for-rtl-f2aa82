// oci_nonorth_decoder - decoder of one bit slice of a TDMA (overloaded)
// OCI port.
//
// The parity of the channel count in chip j is the XOR of all orthogonal
// senders' data bits (the same in every chip) XOR their chips in chip j,
// plus the bit of the TDMA port that owns slot j. The XOR of several Walsh
// chips is itself chip j of the Walsh code whose index is the XOR of their
// indices (code_x_i, supplied by the arbiter), and every Walsh code is +1
// (bit 0) in chip 0, where no TDMA port sends. The decoder therefore keeps
// two bits in a register, bit 0 of the channel count in chip 0 and in its
// own slot, and recovers its data bit as their XOR, corrected by chip SLOT
// of code code_x_i. The 2-bit register and the taps on bit 0 of the channel
// bus follow the document's figure of this decoder; the parity argument,
// the chip-0 reference and the correction term are this design's
// reconstruction.
//
// Interface: sum_lsb_i bit 0 of the channel count, cnt_i its chip index,
// code_x_i the XOR of the Walsh code indices on the channel in this frame,
// act_i "a word for this port is in this frame". Timing: data_o and a
// one-cycle valid_o are loaded on the edge that takes chip N-1.
module oci_nonorth_decoder
  import cdma_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned SLOT = 1,
  localparam int unsigned L = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sum_lsb_i,
  input  logic [L-1:0] cnt_i,
  input  logic [L-1:0] code_x_i,
  input  logic         act_i,
  output logic         data_o,
  output logic         valid_o
);

  logic [1:0] lsb_q;   // [0]: chip 0 reference, [1]: own slot
  logic [1:0] lsb_n;

  always_comb begin
    lsb_n = lsb_q;
    if (cnt_i == '0)        lsb_n[0] = sum_lsb_i;
    if (cnt_i == L'(SLOT))  lsb_n[1] = sum_lsb_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lsb_q   <= '0;
      data_o  <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      lsb_q   <= lsb_n;
      valid_o <= 1'b0;
      if (cnt_i == L'(N - 1)) begin
        data_o  <= lsb_n[0] ^ lsb_n[1] ^ walsh_chip(32'(code_x_i), SLOT);
        valid_o <= act_i;
      end
    end
  end

  initial assert (N >= 2 && SLOT >= 1 && SLOT < N)
    else $error("oci_nonorth_decoder: needs a slot in 1..N-1");

endmodule

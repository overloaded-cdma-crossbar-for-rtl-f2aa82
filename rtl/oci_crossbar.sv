// oci_crossbar - overloaded CDMA interconnect (OCI) crossbar, time-slot
// (T-OCI) variant.
//
// Walsh codes of length N give only N-1 usable orthogonal codes. The
// overloaded crossbar adds N-1 more ports by giving each of them one time
// slot (chip 1..N-1) of the frame, so M = 2N-2 TX/RX port pairs share one
// channel that is still decoded with the simple accumulator. Every bit of
// an A-bit word travels in its own bit slice: per slice, M hybrid encoders
// spread the bit (XOR with a Walsh chip, or AND with a slot chip), a
// pipelined tree adder counts the ones, and per RX port an orthogonal
// decoder (accumulator and sign bit) or a TDMA decoder (parity of the count)
// recovers it. One arbiter and one chip counter serve all slices.
//
// Handshake (this design's choice): a TX port holds tx_valid_i, tx_dest_i
// (0..M-1; ports 0..N-2 are orthogonal, N-1..M-1 TDMA) and tx_data_i until
// tx_ready_o pulses in the last cycle of a frame. The word crosses in the
// next frame and is delivered with a one-cycle rx_valid_o pulse
// N+ceil(log2 M)+2 cycles after the tx_ready_o pulse. The document presents
// the architecture as bit slices with encoder/decoder wrappers, an
// arithmetic adder with pipeline registers and a router arbiter; port
// count, word width and handshake details are this design's.
module oci_crossbar
  import cdma_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned A = 8,
  localparam int unsigned M  = 2 * N - 2,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned PW = $clog2(M),
  localparam int unsigned S  = $clog2(M),
  localparam int unsigned SW = $clog2(M + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [M-1:0]         tx_valid_i,
  input  logic [M-1:0][PW-1:0] tx_dest_i,
  input  logic [M-1:0][A-1:0]  tx_data_i,
  output logic [M-1:0]         tx_ready_o,
  output logic [M-1:0]         rx_valid_o,
  output logic [M-1:0][A-1:0]  rx_data_o
);

  logic [M-1:0][A-1:0]  data_q;
  logic [M-1:0]         enc_chip, dec_act;
  spread_mode_e [M-1:0] enc_mode;
  logic [L-1:0]         cnt, dec_cnt, dec_code_x;
  logic [A-1:0][M-1:0]  valid_s;     // per slice valid, all slices agree

  oci_arbiter #(.N(N), .D(S + 1)) u_arb (
    .clk, .rst_n,
    .tx_req_i     (tx_valid_i),
    .tx_dest_i    (tx_dest_i),
    .tx_grant_o   (tx_ready_o),
    .cnt_o        (cnt),
    .enc_chip_o   (enc_chip),
    .enc_mode_o   (enc_mode),
    .dec_cnt_o    (dec_cnt),
    .dec_act_o    (dec_act),
    .dec_code_x_o (dec_code_x)
  );

  // TX buffers
  always_ff @(posedge clk) begin
    if (!rst_n) data_q <= '0;
    else if (cnt == L'(N - 1))
      for (int unsigned i = 0; i < M; i++)
        data_q[i] <= tx_ready_o[i] ? tx_data_i[i] : '0;
  end

  for (genvar b = 0; b < A; b++) begin : g_slice
    logic [M-1:0]  spread;
    logic [SW-1:0] sum;

    for (genvar i = 0; i < M; i++) begin : g_enc
      oci_hybrid_encoder u_enc (
        .data_i   (data_q[i][b]),
        .chip_i   (enc_chip[i]),
        .mode_i   (enc_mode[i]),
        .spread_o (spread[i])
      );
    end

    oci_tree_adder #(.M(M)) u_adder (.clk, .rst_n, .bits_i(spread), .sum_o(sum));

    for (genvar k = 0; k < M; k++) begin : g_dec
      if (k < N - 1) begin : g_orth
        oci_orth_decoder #(.N(N), .SW(SW)) u_dec (
          .clk, .rst_n,
          .sum_i   (sum),
          .chip_i  (walsh_chip(k + 1, 32'(dec_cnt))),
          .cnt_i   (dec_cnt),
          .act_i   (dec_act[k]),
          .data_o  (rx_data_o[k][b]),
          .valid_o (valid_s[b][k])
        );
      end else begin : g_tdma
        oci_nonorth_decoder #(.N(N), .SLOT(k - N + 2)) u_dec (
          .clk, .rst_n,
          .sum_lsb_i (sum[0]),
          .cnt_i     (dec_cnt),
          .code_x_i  (dec_code_x),
          .act_i     (dec_act[k]),
          .data_o    (rx_data_o[k][b]),
          .valid_o   (valid_s[b][k])
        );
      end
    end
  end

  assign rx_valid_o = valid_s[0];

  a_slices_agree: assert property (@(posedge clk) disable iff (!rst_n) valid_s == {A{valid_s[0]}})
    else $error("oci_crossbar: bit slices disagree on rx_valid");

endmodule

// poci_crossbar - overloaded CDMA interconnect, parallel (P-OCI) variant.
//
// Same codes and ports as oci_crossbar (M = 2N-2 ports: N-1 Walsh-coded, N-1
// time-slot coded; see cdma_pkg), but all N chips of a frame are sent in one
// clock cycle. For every bit slice and every chip there is a row of M hybrid
// encoders and its own pipelined tree adder (the adder replicated N times),
// so a word crosses in one cycle instead of N. Orthogonal RX ports correlate
// all N chip counts at once (poci_orth_decoder); TDMA RX ports compare bit 0
// of the chip-0 count and of their slot's count (poci_nonorth_decoder).
//
// Handshake (this design's choice): a TX port holds tx_valid_i, tx_dest_i
// and tx_data_i until tx_ready_o is high in a cycle; the arbiter decides
// every cycle. The word appears with a one-cycle rx_valid_o pulse
// ceil(log2 M)+3 cycles after that cycle. Up to M words cross per cycle.
module poci_crossbar
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
  logic [M-1:0][N-1:0]  enc_chips;
  spread_mode_e [M-1:0] enc_mode;
  logic [M-1:0]         dec_act;
  logic [L-1:0]         dec_code_x;
  logic [A-1:0][M-1:0]  valid_s;

  poci_arbiter #(.N(N), .D(S + 1)) u_arb (
    .clk, .rst_n,
    .tx_req_i     (tx_valid_i),
    .tx_dest_i    (tx_dest_i),
    .tx_grant_o   (tx_ready_o),
    .enc_chips_o  (enc_chips),
    .enc_mode_o   (enc_mode),
    .dec_act_o    (dec_act),
    .dec_code_x_o (dec_code_x)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) data_q <= '0;
    else
      for (int unsigned i = 0; i < M; i++)
        data_q[i] <= tx_ready_o[i] ? tx_data_i[i] : '0;
  end

  for (genvar b = 0; b < A; b++) begin : g_slice
    logic [N-1:0][SW-1:0] sums;

    for (genvar j = 0; j < N; j++) begin : g_chip
      logic [M-1:0] spread;
      for (genvar i = 0; i < M; i++) begin : g_enc
        oci_hybrid_encoder u_enc (
          .data_i   (data_q[i][b]),
          .chip_i   (enc_chips[i][j]),
          .mode_i   (enc_mode[i]),
          .spread_o (spread[i])
        );
      end
      oci_tree_adder #(.M(M)) u_adder (.clk, .rst_n, .bits_i(spread), .sum_o(sums[j]));
    end

    for (genvar k = 0; k < M; k++) begin : g_dec
      if (k < N - 1) begin : g_orth
        poci_orth_decoder #(.N(N), .SW(SW), .CODE(k + 1)) u_dec (
          .clk, .rst_n,
          .sums_i  (sums),
          .act_i   (dec_act[k]),
          .data_o  (rx_data_o[k][b]),
          .valid_o (valid_s[b][k])
        );
      end else begin : g_tdma
        poci_nonorth_decoder #(.N(N), .SLOT(k - N + 2)) u_dec (
          .clk, .rst_n,
          .lsb0_i   (sums[0][0]),
          .lsbs_i   (sums[k - N + 2][0]),
          .code_x_i (dec_code_x),
          .act_i    (dec_act[k]),
          .data_o   (rx_data_o[k][b]),
          .valid_o  (valid_s[b][k])
        );
      end
    end
  end

  assign rx_valid_o = valid_s[0];

  a_slices_agree: assert property (@(posedge clk) disable iff (!rst_n) valid_s == {A{valid_s[0]}})
    else $error("poci_crossbar: bit slices disagree on rx_valid");

endmodule

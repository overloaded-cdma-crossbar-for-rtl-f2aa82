// acdma_crossbar - aggregated-CDMA (ACDMA) crossbar connecting N TX ports to
// N RX ports over one shared channel.
//
// Instead of spreading each bit of a word on its own CDMA channel, the ACDMA
// crossbar spreads the whole W-bit word with one chip per cycle: the encoder
// XORs the word with the chip, a pipelined tree adds all encoded words and
// chips into one W+1+log2(N)-bit channel value, and every RX port recovers its
// word with an up/down accumulator over the N chips of a frame. All N TX
// ports can send at once as long as their destinations differ, so the
// crossbar carries N words per N cycles.
//
// Handshake (this design's choice): a TX port holds tx_valid_i, tx_dest_i
// and tx_data_i until tx_ready_o pulses, which happens in the
// last cycle of a frame when the word is taken. The word is then sent during
// the next frame (N cycles); the decoded word appears at the addressed RX
// port with a one-cycle rx_valid_o pulse N+log2(N)+1 cycles after the
// tx_ready_o pulse. Words are W-bit two's complement.
module acdma_crossbar #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 7,
  localparam int unsigned L = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        tx_valid_i,
  input  logic [N-1:0][L-1:0] tx_dest_i,
  input  logic [N-1:0][W-1:0] tx_data_i,
  output logic [N-1:0]        tx_ready_o,
  output logic [N-1:0]        rx_valid_o,
  output logic [N-1:0][W-1:0] rx_data_o
);

  logic [N-1:0][W-1:0]   data_q;   // TX word of the current frame
  logic [N-1:0][W-1:0]   enc;
  logic [N-1:0]          enc_chip;
  logic [N-1:0]          dec_chip;
  logic [N-1:0]          dec_act;
  logic [L-1:0]          cnt, dec_cnt;
  logic signed [W+L:0]   sum;

  acdma_controller #(.N(N)) u_ctrl (
    .clk, .rst_n,
    .tx_req_i   (tx_valid_i),
    .tx_dest_i  (tx_dest_i),
    .tx_grant_o (tx_ready_o),
    .cnt_o      (cnt),
    .enc_chip_o (enc_chip),
    .dec_cnt_o  (dec_cnt),
    .dec_chip_o (dec_chip),
    .dec_act_o  (dec_act)
  );

  // TX buffers: a port that was not granted sends zero, which adds nothing.
  always_ff @(posedge clk) begin
    if (!rst_n) data_q <= '0;
    else if (cnt == L'(N - 1))
      for (int unsigned i = 0; i < N; i++)
        data_q[i] <= tx_ready_o[i] ? tx_data_i[i] : '0;
  end

  for (genvar i = 0; i < N; i++) begin : g_enc
    acdma_encoder #(.W(W)) u_enc (
      .data_i (data_q[i]),
      .chip_i (enc_chip[i]),
      .enc_o  (enc[i])
    );
  end

  acdma_channel_adder #(.N(N), .W(W)) u_adder (
    .clk, .rst_n,
    .enc_i  (enc),
    .chip_i (enc_chip),
    .sum_o  (sum)
  );

  for (genvar k = 0; k < N; k++) begin : g_dec
    acdma_decoder #(.N(N), .W(W)) u_dec (
      .clk, .rst_n,
      .sum_i   (sum),
      .chip_i  (dec_chip[k]),
      .cnt_i   (dec_cnt),
      .act_i   (dec_act[k]),
      .data_o  (rx_data_o[k]),
      .valid_o (rx_valid_o[k])
    );
  end

endmodule

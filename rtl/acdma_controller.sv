// acdma_controller - code assignment, arbitration and chip counting for the
// ACDMA crossbar.
//
// A free-running chip counter divides time into frames of N cycles; one
// W-bit word per TX port crosses the crossbar in a frame. In the last cycle
// of a frame the controller grants, for every RX port, one of the TX ports
// that request it (round robin, starting from a pointer that advances every
// frame) and latches the winners' destinations. In the next frame a granted
// TX port is spread with the Walsh code of its destination RX port, so each
// RX port despreads with its own fixed code. The decoders see the channel
// sum log2(N) cycles late (the adder tree depth), so the controller delays
// the chip counter and the per-RX "word addressed to you" flags by the same
// amount before handing them to the decoders.
//
// The document gives the controller only as the source of the spreading
// code and the counter; the request/grant handshake, the round-robin rule
// and the destination-code assignment are this design's choices.
//
// Interface: tx_req_i/tx_dest_i per TX port; tx_grant_o pulses in the frame's
// last cycle for each accepted request; enc_chip_o is the spreading chip of
// each TX port (0 when the port is idle); dec_cnt_o / dec_chip_o / dec_act_o
// drive the N decoders. dec_chip_o[0] is constant 0: RX port 0 despreads
// with Walsh code 0, whose chips are all +1.
module acdma_controller
  import cdma_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned L = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        tx_req_i,
  input  logic [N-1:0][L-1:0] tx_dest_i,
  output logic [N-1:0]        tx_grant_o,
  output logic [L-1:0]        cnt_o,
  output logic [N-1:0]        enc_chip_o,
  output logic [L-1:0]        dec_cnt_o,
  output logic [N-1:0]        dec_chip_o,
  output logic [N-1:0]        dec_act_o
);

  logic [L-1:0]        cnt_q;
  logic [L-1:0]        rr_q;
  logic [N-1:0]        act_q;       // TX port sends in this frame
  logic [N-1:0][L-1:0] dest_q;      // its destination RX port
  logic [N-1:0]        rx_act;      // RX port addressed in this frame
  logic [N-1:0]        grant;
  logic                last;

  assign last = (cnt_q == L'(N - 1));

  // Round-robin arbitration, one winner per destination RX port.
  always_comb begin
    logic [N-1:0] taken;
    int unsigned  i;
    grant = '0;
    taken = '0;
    for (int unsigned o = 0; o < N; o++) begin
      i = (int'(rr_q) + o) % N;
      if (tx_req_i[i] && !taken[tx_dest_i[i]]) begin
        grant[i]             = 1'b1;
        taken[tx_dest_i[i]]  = 1'b1;
      end
    end
  end

  assign tx_grant_o = last ? grant : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      rr_q   <= '0;
      act_q  <= '0;
      dest_q <= '0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (last) begin
        act_q  <= grant;
        dest_q <= tx_dest_i;
        rr_q   <= rr_q + 1'b1;
      end
    end
  end

  always_comb begin
    rx_act = '0;
    for (int unsigned i = 0; i < N; i++) begin
      enc_chip_o[i] = act_q[i] & walsh_chip(32'(dest_q[i]), 32'(cnt_q));
      if (act_q[i]) rx_act[dest_q[i]] = 1'b1;
    end
  end

  // Delay line matching the adder tree latency.
  logic [L-1:0] cnt_d [L+1];
  logic [N-1:0] act_d [L+1];
  assign cnt_d[0] = cnt_q;
  assign act_d[0] = rx_act;
  for (genvar s = 1; s <= L; s++) begin : g_dly
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        cnt_d[s] <= '0;
        act_d[s] <= '0;
      end else begin
        cnt_d[s] <= cnt_d[s-1];
        act_d[s] <= act_d[s-1];
      end
    end
  end

  assign cnt_o     = cnt_q;
  assign dec_cnt_o = cnt_d[L];
  assign dec_act_o = act_d[L];
  always_comb
    for (int unsigned k = 0; k < N; k++) dec_chip_o[k] = walsh_chip(k, 32'(dec_cnt_o));

endmodule

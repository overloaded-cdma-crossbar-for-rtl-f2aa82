// oci_arbiter - code assignment, arbitration and chip counter of the OCI
// crossbar.
//
// A chip counter shared by all code generators divides time into frames of
// N cycles. In the last cycle of a frame the arbiter grants, for every RX
// port, one of the TX ports that request it (round robin from a pointer that
// advances every frame). In the next frame each granted TX port spreads its
// word with its destination's code: a Walsh code for an orthogonal RX port
// or a time slot for a TDMA RX port (see cdma_pkg). Idle TX ports send chip
// 0 in orthogonal mode, which puts nothing on the channel. The decoders see
// the channel D cycles late (the adder pipeline), so the counter, the
// per-RX "addressed" flags and code_x, the XOR of the Walsh code indices in
// use (needed by the TDMA decoders), are delayed by D.
//
// The document gives an arbiter block for code assignment and arbitration,
// with start/idle signals at the TX buffers, valid/acknowledge at the RX
// buffers and one counter feeding all code generators. The request/grant
// pairing, the round-robin rule and code_x are this design's choices; RX
// ports always accept, so no acknowledge is modelled. tx_dest_i must be
// below M.
module oci_arbiter
  import cdma_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned D = 5,
  localparam int unsigned M  = 2 * N - 2,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned PW = $clog2(M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [M-1:0]         tx_req_i,
  input  logic [M-1:0][PW-1:0] tx_dest_i,
  output logic [M-1:0]         tx_grant_o,
  output logic [L-1:0]         cnt_o,
  output logic [M-1:0]         enc_chip_o,
  output spread_mode_e [M-1:0] enc_mode_o,
  output logic [L-1:0]         dec_cnt_o,
  output logic [M-1:0]         dec_act_o,
  output logic [L-1:0]         dec_code_x_o
);

  logic [L-1:0]         cnt_q;
  logic [PW-1:0]        rr_q;
  logic [M-1:0]         act_q;
  logic [M-1:0][PW-1:0] dest_q;
  logic [M-1:0]         grant, rx_act;
  logic [L-1:0]         code_x;
  logic                 last;

  assign last = (cnt_q == L'(N - 1));

  always_comb begin
    logic [M-1:0] taken;
    int unsigned  i;
    grant = '0;
    taken = '0;
    for (int unsigned o = 0; o < M; o++) begin
      i = (int'(rr_q) + o) % M;
      if (tx_req_i[i] && (int'(tx_dest_i[i]) < M) && !taken[tx_dest_i[i]]) begin
        grant[i]            = 1'b1;
        taken[tx_dest_i[i]] = 1'b1;
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
        rr_q   <= (rr_q == PW'(M - 1)) ? '0 : rr_q + 1'b1;
      end
    end
  end

  always_comb begin
    rx_act = '0;
    code_x = '0;
    for (int unsigned i = 0; i < M; i++) begin
      enc_chip_o[i] = 1'b0;
      enc_mode_o[i] = SPREAD_ORTH;
      if (act_q[i]) begin
        enc_chip_o[i]     = oci_chip(32'(dest_q[i]), 32'(cnt_q), N);
        enc_mode_o[i]     = oci_mode(32'(dest_q[i]), N);
        rx_act[dest_q[i]] = 1'b1;
        if (oci_mode(32'(dest_q[i]), N) == SPREAD_ORTH) code_x ^= L'(dest_q[i] + 1'b1);
      end
    end
  end

  logic [L-1:0] cnt_d  [D+1];
  logic [M-1:0] act_d  [D+1];
  logic [L-1:0] codx_d [D+1];
  assign cnt_d[0]  = cnt_q;
  assign act_d[0]  = rx_act;
  assign codx_d[0] = code_x;
  for (genvar s = 1; s <= D; s++) begin : g_dly
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        cnt_d[s]  <= '0;
        act_d[s]  <= '0;
        codx_d[s] <= '0;
      end else begin
        cnt_d[s]  <= cnt_d[s-1];
        act_d[s]  <= act_d[s-1];
        codx_d[s] <= codx_d[s-1];
      end
    end
  end

  assign cnt_o        = cnt_q;
  assign dec_cnt_o    = cnt_d[D];
  assign dec_act_o    = act_d[D];
  assign dec_code_x_o = codx_d[D];

endmodule

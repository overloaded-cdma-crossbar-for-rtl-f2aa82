// poci_arbiter - arbitration and code assignment of the parallel overloaded
// crossbar (P-OCI).
//
// In the parallel variant a whole frame of N chips is sent in one cycle, so
// the arbiter decides every cycle: for every RX port it grants one of the TX
// ports that request it (round robin, pointer advancing every cycle) and
// registers the winners' destinations. In the following cycle each granted
// TX port spreads with its destination's code; the arbiter gives every TX
// port all N chips of that code and its spreading mode (idle ports: chips 0,
// orthogonal mode). The per-RX "addressed" flags and code_x (the XOR of the
// Walsh code indices in use) are delayed by D cycles to meet the decoders.
// The document gives the arbiter's task, code assignment and arbitration;
// the rules here are this design's, as in oci_arbiter.
module poci_arbiter
  import cdma_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned D = 5,
  localparam int unsigned M  = 2 * N - 2,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned PW = $clog2(M)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [M-1:0]          tx_req_i,
  input  logic [M-1:0][PW-1:0]  tx_dest_i,
  output logic [M-1:0]          tx_grant_o,
  output logic [M-1:0][N-1:0]   enc_chips_o,
  output spread_mode_e [M-1:0]  enc_mode_o,
  output logic [M-1:0]          dec_act_o,
  output logic [L-1:0]          dec_code_x_o
);

  logic [PW-1:0]        rr_q;
  logic [M-1:0]         act_q, grant, rx_act;
  logic [M-1:0][PW-1:0] dest_q;
  logic [L-1:0]         code_x;

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

  assign tx_grant_o = grant;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_q   <= '0;
      act_q  <= '0;
      dest_q <= '0;
    end else begin
      act_q  <= grant;
      dest_q <= tx_dest_i;
      rr_q   <= (rr_q == PW'(M - 1)) ? '0 : rr_q + 1'b1;
    end
  end

  always_comb begin
    rx_act = '0;
    code_x = '0;
    for (int unsigned i = 0; i < M; i++) begin
      enc_chips_o[i] = '0;
      enc_mode_o[i]  = SPREAD_ORTH;
      if (act_q[i]) begin
        for (int unsigned j = 0; j < N; j++) enc_chips_o[i][j] = oci_chip(32'(dest_q[i]), j, N);
        enc_mode_o[i]     = oci_mode(32'(dest_q[i]), N);
        rx_act[dest_q[i]] = 1'b1;
        if (oci_mode(32'(dest_q[i]), N) == SPREAD_ORTH) code_x ^= L'(dest_q[i] + 1'b1);
      end
    end
  end

  logic [M-1:0] act_d  [D+1];
  logic [L-1:0] codx_d [D+1];
  assign act_d[0]  = rx_act;
  assign codx_d[0] = code_x;
  for (genvar s = 1; s <= D; s++) begin : g_dly
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        act_d[s]  <= '0;
        codx_d[s] <= '0;
      end else begin
        act_d[s]  <= act_d[s-1];
        codx_d[s] <= codx_d[s-1];
      end
    end
  end

  assign dec_act_o    = act_d[D];
  assign dec_code_x_o = codx_d[D];

endmodule

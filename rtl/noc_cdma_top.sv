// noc_cdma_top - the three network-on-chip building blocks side by side.
//
// acdma_crossbar is the aggregated-CDMA crossbar: N TX ports, N RX ports,
// W-bit words spread with Walsh codes over one shared adder channel.
// oci_crossbar is the overloaded CDMA crossbar: 2*OCI_N-2 ports share
// Walsh codes of length OCI_N, half of them as time slots, with OCI_A-bit
// words in bit slices, one chip per cycle (T-OCI). poci_crossbar is the
// parallel form of the same crossbar (P-OCI): same ports, codes and sizes,
// but all OCI_N chips go through OCI_N adders in one cycle. router_1x3 is the
// packet router with one 8-bit input and three buffered outputs. They share
// no signals apart from clock and reset; each has its own ports here. The
// crossbars use an active-low reset, the router the active-high reset named
// in its port list, both derived from rst_n.
module noc_cdma_top #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 7,
  parameter int unsigned OCI_N = 8,
  parameter int unsigned OCI_A = 8,
  parameter int unsigned FIFO_DEPTH = 128,
  localparam int unsigned L = $clog2(N),
  localparam int unsigned OCI_M = 2 * OCI_N - 2,
  localparam int unsigned OCI_PW = $clog2(OCI_M)
) (
  input  logic                clk,
  input  logic                rst_n,
  // ACDMA crossbar
  input  logic [N-1:0]        tx_valid,
  input  logic [N-1:0][L-1:0] tx_dest,
  input  logic [N-1:0][W-1:0] tx_data,
  output logic [N-1:0]        tx_ready,
  output logic [N-1:0]        rx_valid,
  output logic [N-1:0][W-1:0] rx_data,
  // OCI crossbar
  input  logic [OCI_M-1:0]              oci_tx_valid,
  input  logic [OCI_M-1:0][OCI_PW-1:0]  oci_tx_dest,
  input  logic [OCI_M-1:0][OCI_A-1:0]   oci_tx_data,
  output logic [OCI_M-1:0]              oci_tx_ready,
  output logic [OCI_M-1:0]              oci_rx_valid,
  output logic [OCI_M-1:0][OCI_A-1:0]   oci_rx_data,
  // P-OCI crossbar
  input  logic [OCI_M-1:0]              poci_tx_valid,
  input  logic [OCI_M-1:0][OCI_PW-1:0]  poci_tx_dest,
  input  logic [OCI_M-1:0][OCI_A-1:0]   poci_tx_data,
  output logic [OCI_M-1:0]              poci_tx_ready,
  output logic [OCI_M-1:0]              poci_rx_valid,
  output logic [OCI_M-1:0][OCI_A-1:0]   poci_rx_data,
  // 1x3 router
  input  logic [7:0]          rt_data,
  input  logic                rt_packet_valid,
  output logic                rt_suspend_data,
  output logic                rt_err,
  output logic [2:0][7:0]     rt_data_out,
  output logic [2:0]          rt_vld_out,
  input  logic [2:0]          rt_read_enb
);

  acdma_crossbar #(.N(N), .W(W)) u_xbar (
    .clk, .rst_n,
    .tx_valid_i (tx_valid),
    .tx_dest_i  (tx_dest),
    .tx_data_i  (tx_data),
    .tx_ready_o (tx_ready),
    .rx_valid_o (rx_valid),
    .rx_data_o  (rx_data)
  );

  oci_crossbar #(.N(OCI_N), .A(OCI_A)) u_oci (
    .clk, .rst_n,
    .tx_valid_i (oci_tx_valid),
    .tx_dest_i  (oci_tx_dest),
    .tx_data_i  (oci_tx_data),
    .tx_ready_o (oci_tx_ready),
    .rx_valid_o (oci_rx_valid),
    .rx_data_o  (oci_rx_data)
  );

  poci_crossbar #(.N(OCI_N), .A(OCI_A)) u_poci (
    .clk, .rst_n,
    .tx_valid_i (poci_tx_valid),
    .tx_dest_i  (poci_tx_dest),
    .tx_data_i  (poci_tx_data),
    .tx_ready_o (poci_tx_ready),
    .rx_valid_o (poci_rx_valid),
    .rx_data_o  (poci_rx_data)
  );

  router_1x3 #(.FIFO_DEPTH(FIFO_DEPTH)) u_router (
    .clock        (clk),
    .reset        (!rst_n),
    .data         (rt_data),
    .packet_valid (rt_packet_valid),
    .suspend_data (rt_suspend_data),
    .err          (rt_err),
    .data_out_0   (rt_data_out[0]),
    .data_out_1   (rt_data_out[1]),
    .data_out_2   (rt_data_out[2]),
    .vld_out_0    (rt_vld_out[0]),
    .vld_out_1    (rt_vld_out[1]),
    .vld_out_2    (rt_vld_out[2]),
    .read_enb_0   (rt_read_enb[0]),
    .read_enb_1   (rt_read_enb[1]),
    .read_enb_2   (rt_read_enb[2])
  );

endmodule

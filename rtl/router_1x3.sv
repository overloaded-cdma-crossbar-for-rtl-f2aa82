// router_1x3 - packet router with one 8-bit input port and three output
// ports.
//
// A source presents packets byte by byte on data with packet_valid high:
// a header byte (bits [1:0] destination 0..2, bits [7:2] payload length),
// the payload bytes and a parity byte (XOR of header and payload). The
// router controller (router_fsm) writes every byte of the packet into the
// FIFO of the addressed output, tagging the parity byte as the packet's
// last, and holds the source with suspend_data while that FIFO is full. The
// register block (router_reg) keeps the header and checks the parity,
// raising err for a corrupted packet. The FIFOs store and forward: an
// output shows a packet only once all of it, parity byte included, is
// stored; it then presents the head byte on data_out_x with vld_out_x and
// pops it with read_enb_x. FIFO_DEPTH must hold the longest packet, 65
// bytes (header, 63 payload bytes, parity). The port names, the register /
// controller / three-FIFO structure and the store-and-forward buffering
// follow the document; packet framing, FIFO depth and the active-high
// synchronous reset are this design's choices.
//
// Timing: a byte is taken on the rising edge of a cycle with packet_valid
// high and suspend_data low. A packet can be read from its output FIFO from
// the cycle after its parity byte was taken.
module router_1x3 #(
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] data,
  input  logic       packet_valid,
  output logic       suspend_data,
  output logic       err,
  output logic [7:0] data_out_0,
  output logic [7:0] data_out_1,
  output logic [7:0] data_out_2,
  output logic       vld_out_0,
  output logic       vld_out_1,
  output logic       vld_out_2,
  input  logic       read_enb_0,
  input  logic       read_enb_1,
  input  logic       read_enb_2
);

  logic [7:0] header_q;
  logic [2:0] we, full, rd, vld;
  logic [7:0] dout [3];
  logic       hdr_ld, pay_ld, par_ld;

  router_reg u_reg (
    .clock, .reset, .data,
    .hdr_ld, .pay_ld, .par_ld,
    .header     (header_q),
    .err
  );

  router_fsm u_fsm (
    .clock, .reset, .packet_valid, .data,
    .dest_q    (header_q[1:0]),
    .fifo_full (full),
    .suspend_data,
    .we, .hdr_ld, .pay_ld, .par_ld
  );

  assign rd = {read_enb_2, read_enb_1, read_enb_0};

  for (genvar p = 0; p < 3; p++) begin : g_fifo
    router_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clock, .reset,
      .we       (we[p]),
      .din      (data),
      .last     (par_ld),
      .read_enb (rd[p]),
      .data_out (dout[p]),
      .vld_out  (vld[p]),
      .full     (full[p])
    );
  end

  assign data_out_0 = dout[0];
  assign data_out_1 = dout[1];
  assign data_out_2 = dout[2];
  assign vld_out_0  = vld[0];
  assign vld_out_1  = vld[1];
  assign vld_out_2  = vld[2];

  initial assert (FIFO_DEPTH >= 65)
    else $error("router_1x3: FIFO_DEPTH must hold a 65-byte packet");

endmodule

// router_fifo - store-and-forward output FIFO of one port of the 1x3 packet
// router.
//
// A circular buffer of DEPTH entries with separate read and write pointers
// and an occupancy counter. Each entry holds a byte and a "last" tag, set
// on the byte written with last high (the packet's parity byte). A second
// counter holds the number of complete packets in the buffer. The output
// side sees only complete packets: vld_out is high while at least one
// packet has been stored up to its last byte, the head byte is presented on
// data_out (first-word fall-through), and read_enb pops it. Bytes of a
// packet still arriving stay hidden until its last byte is written, which
// is the store-and-forward buffering the router is built around. A write to
// a full FIFO or a read with vld_out low is ignored; the router controller
// never attempts the former, which an assertion checks. Writing and reading
// in the same cycle is allowed.
//
// Store-and-forward needs room for a whole packet, so DEPTH must be at
// least the longest packet the source may send, or a long packet would
// wait forever for its own end. The three output FIFOs and store-and-forward
// flow control follow the document; the depth, the last tag, the
// fall-through read and the synchronous active-high reset are this design's
// choices.
module router_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             we,
  input  logic [WIDTH-1:0] din,
  input  logic             last,
  input  logic             read_enb,
  output logic [WIDTH-1:0] data_out,
  output logic             vld_out,
  output logic             full
);

  logic [WIDTH-1:0] mem  [DEPTH];
  logic             tail [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count, pkts;
  logic             do_wr, do_rd;

  assign full     = (count == (AW+1)'(DEPTH));
  assign vld_out  = (pkts != '0);
  assign do_wr    = we && !full;
  assign do_rd    = read_enb && vld_out;
  assign data_out = mem[rptr];

  always_ff @(posedge clock) begin
    if (reset) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      pkts  <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      pkts  <= pkts + (AW+1)'(do_wr && last) - (AW+1)'(do_rd && tail[rptr]);
    end
  end

  always_ff @(posedge clock)
    if (do_wr) begin
      mem[wptr]  <= din;
      tail[wptr] <= last;
    end

  a_no_overflow: assert property (@(posedge clock) disable iff (reset) !(we && full))
    else $error("router_fifo: write while full");

endmodule

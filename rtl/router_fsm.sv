// router_fsm - controller of the 1x3 packet router.
//
// Three states. DECODE waits for packet_valid; the byte it accepts there is
// the header, whose bits [1:0] select the output FIFO and bits [7:2] give the
// payload length. LOAD_DATA accepts that many payload bytes, LOAD_PARITY the
// parity byte, and the FSM returns to DECODE. Every accepted byte (header,
// payload and parity) is written into the selected FIFO, so the receiver
// gets the whole packet. A byte is accepted in a cycle where packet_valid is
// high and suspend_data is low; suspend_data is raised while the selected
// FIFO is full, holding the source until a byte is read out. A header with
// destination 3 (no such port) is consumed with its packet and written
// nowhere. The document gives the controller as an FSM that steers data to
// the three FIFOs and raises suspend_data and err; the state set, the packet
// framing and the drop rule are this design's choices.
//
// Interface: dest_q is the destination field of the header latched by
// router_reg; the load
// strobes go to router_reg; we[2:0] are the FIFO write enables.
module router_fsm (
  input  logic       clock,
  input  logic       reset,
  input  logic       packet_valid,
  input  logic [7:0] data,
  input  logic [1:0] dest_q,    // destination of the latched header
  input  logic [2:0] fifo_full,
  output logic       suspend_data,
  output logic [2:0] we,
  output logic       hdr_ld,
  output logic       pay_ld,
  output logic       par_ld
);

  typedef enum logic [1:0] {DECODE, LOAD_DATA, LOAD_PARITY} state_e;
  state_e     state, state_n;
  logic [5:0] left, left_n;     // payload bytes still to come
  logic [1:0] dest;
  logic       acc;

  assign dest         = (state == DECODE) ? data[1:0] : dest_q;
  assign suspend_data = (dest != 2'd3) && fifo_full[dest];
  assign acc          = packet_valid && !suspend_data;

  always_comb begin
    state_n = state;
    left_n  = left;
    hdr_ld  = 1'b0;
    pay_ld  = 1'b0;
    par_ld  = 1'b0;
    unique case (state)
      DECODE: if (acc) begin
        hdr_ld  = 1'b1;
        left_n  = data[7:2];
        state_n = (data[7:2] == '0) ? LOAD_PARITY : LOAD_DATA;
      end
      LOAD_DATA: if (acc) begin
        pay_ld = 1'b1;
        left_n = left - 1'b1;
        if (left == 6'd1) state_n = LOAD_PARITY;
      end
      LOAD_PARITY: if (acc) begin
        par_ld  = 1'b1;
        state_n = DECODE;
      end
      default: state_n = DECODE;
    endcase
    we = '0;
    if (acc && dest != 2'd3) we[dest] = 1'b1;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= DECODE;
      left  <= '0;
    end else begin
      state <= state_n;
      left  <= left_n;
    end
  end

endmodule

// acdma_decoder - up/down accumulator decoder of one ACDMA RX port.
//
// Over one decoding cycle of N chips the decoder adds the channel value S to
// its register when the despreading chip is +1 (chip bit 0) and subtracts it
// when the chip is -1 (chip bit 1). Because the Walsh codes are orthogonal,
// the register then holds N*d_k for the word d_k that was spread with this
// port's code; with N a power of two the word is recovered by an arithmetic
// shift right of log2(N) bits. A multiplexer in front of the adder/subtractor,
// steered by the chip counter, feeds it zero instead of the register on the
// first chip, so a new decoding cycle starts without a separate clear. The
// accumulator is W+1+2*log2(N) bits wide so that no partial sum can overflow
// (the register width is this design's choice).
//
// Interface: sum_i is the channel value, chip_i the despreading chip,
// cnt_i the chip index of sum_i (0..N-1), act_i marks a cycle in which a
// word is addressed to this port. Timing: on the clock edge that takes chip
// N-1, data_o is loaded with the decoded word and valid_o pulses for one
// cycle if act_i was high with that chip.
module acdma_decoder #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 7,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned SW = W + L + 1,
  localparam int unsigned AW = W + 2 * L + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [SW-1:0]  sum_i,
  input  logic                  chip_i,
  input  logic [L-1:0]          cnt_i,
  input  logic                  act_i,
  output logic [W-1:0]          data_o,
  output logic                  valid_o
);

  logic signed [AW-1:0] acc_q, base, res;

  always_comb begin
    base = (cnt_i == '0) ? '0 : acc_q;          // counter-driven mux
    res  = chip_i ? base - AW'(sum_i) : base + AW'(sum_i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q   <= '0;
      data_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      acc_q   <= res;
      valid_o <= 1'b0;
      if (cnt_i == L'(N - 1)) begin
        data_o  <= W'(res >>> L);
        valid_o <= act_i;
      end
    end
  end

endmodule

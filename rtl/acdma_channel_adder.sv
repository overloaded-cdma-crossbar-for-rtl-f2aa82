// acdma_channel_adder - pipelined CDMA channel adder of the ACDMA crossbar.
//
// A binary tree of log2(N) adder stages sums the N encoded words E[i] (W-bit,
// two's complement) together with the N spreading chips C[i]. The first
// stage adds two words and their two chips (the chips complete the two's
// complement negation started by the XOR encoders), so each word contributes
// +d or -d. Every stage widens its result by one bit to avoid overflow.
// Because a negated word spans -2^(W-1)..+2^(W-1), which already needs W+1
// bits, stage s produces W+1+s bits and the tree output is W+1+log2(N) bits,
// the output width the document states in its text (its adder figure labels
// the stages one bit narrower, which would overflow when two negated
// most-negative words meet). A pipeline register follows every stage, as in
// the document's adder figure.
//
// Interface: enc_i[i] / chip_i[i] for the N ports, sum_o the signed channel
// value S. Timing: sum_o reflects the inputs of log2(N) clock cycles
// earlier. The registers are cleared by the synchronous active-low reset
// (reset behaviour is this design's choice).
module acdma_channel_adder #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 7,
  localparam int unsigned L = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][W-1:0]   enc_i,
  input  logic [N-1:0]          chip_i,
  output logic signed [W+L:0]   sum_o
);

  for (genvar s = 1; s <= L; s++) begin : g_stage
    localparam int unsigned NO = N >> s;   // adders in this stage
    localparam int unsigned OW = W + 1 + s;  // output width of this stage
    logic signed [OW-1:0] val [NO];

    for (genvar a = 0; a < NO; a++) begin : g_add
      logic signed [OW-1:0] nxt;
      if (s == 1) begin : g_leaf
        always_comb
          nxt = OW'(signed'(enc_i[2*a])) + OW'(signed'(enc_i[2*a+1]))
              + OW'(chip_i[2*a]) + OW'(chip_i[2*a+1]);
      end else begin : g_node
        always_comb
          nxt = OW'(g_stage[s-1].val[2*a]) + OW'(g_stage[s-1].val[2*a+1]);
      end

      always_ff @(posedge clk) begin
        if (!rst_n) val[a] <= '0;
        else        val[a] <= nxt;
      end
    end
  end

  assign sum_o = g_stage[L].val[0];

endmodule

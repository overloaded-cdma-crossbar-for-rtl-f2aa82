// oci_tree_adder - pipelined crossbar adder of one OCI bit slice.
//
// Counts the ones among the M spread bits of one chip. The bits are first
// captured in an input pipeline register, then added pairwise in a binary
// tree of ceil(log2 M) stages, each followed by a pipeline register and each
// one bit wider than the stage before, as in the document's tree-adder
// figure. M is padded with zero inputs to a power of two. The width stops
// growing at SW = ceil(log2(M+1)) bits, the document's m = log2 M output
// (4 bits for M = 14), which holds every count from 0 to M.
//
// Interface: bits_i the M spread bits, sum_o the unsigned count (SW bits).
// Timing: sum_o shows the count of the bits applied ceil(log2 M)+1 cycles
// earlier. Registers clear on the synchronous active-low reset.
module oci_tree_adder #(
  parameter int unsigned M = 14,
  localparam int unsigned S  = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned MP = 1 << S,
  localparam int unsigned SW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [M-1:0]  bits_i,
  output logic [SW-1:0] sum_o
);

  logic [MP-1:0] in_q;

  always_ff @(posedge clk) begin
    if (!rst_n) in_q <= '0;
    else        in_q <= MP'(bits_i);
  end

  for (genvar s = 1; s <= S; s++) begin : g_stage
    localparam int unsigned NO = MP >> s;
    localparam int unsigned OW = (s + 1 < SW) ? s + 1 : SW;
    logic [OW-1:0] val [NO];

    for (genvar a = 0; a < NO; a++) begin : g_add
      logic [OW-1:0] nxt;
      if (s == 1) begin : g_leaf
        assign nxt = OW'(in_q[2*a]) + OW'(in_q[2*a+1]);
      end else begin : g_node
        assign nxt = OW'(g_stage[s-1].val[2*a]) + OW'(g_stage[s-1].val[2*a+1]);
      end

      always_ff @(posedge clk) begin
        if (!rst_n) val[a] <= '0;
        else        val[a] <= nxt;
      end
    end
  end

  assign sum_o = g_stage[S].val[0];

endmodule

// tb_acdma_encoder - exhaustive check of the ACDMA XOR encoder.
//
// For every W-bit word and both chip values the encoded word must equal the
// word with every bit inverted when the chip is 1, and the word itself when
// it is 0. It also checks the arithmetic the crossbar relies on: the encoded
// word, sign-extended, plus the chip equals +d for chip 0 and -d for chip 1.
module tb_acdma_encoder;
  localparam int unsigned W = 7;
  logic clk = 1'b0;
  logic [W-1:0] d, e;
  logic         c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acdma_encoder #(.W(W)) dut (.data_i(d), .chip_i(c), .enc_o(e));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      for (int ch = 0; ch < 2; ch++) begin
        logic [W-1:0]  exp;
        logic signed [W:0] val, want;
        d = W'(v);
        c = ch[0];
        @(posedge clk);
        exp = '0;
        for (int b = 0; b < W; b++) exp[b] = ch[0] ? !v[b] : v[b];
        checks++;
        if (e !== exp) begin
          failures++;
          $display("FAIL d=%0h c=%0d enc=%0h exp=%0h", d, c, e, exp);
        end
        val  = (W+1)'(signed'(e)) + (W+1)'(c);
        want = ch[0] ? -(W+1)'(signed'(d)) : (W+1)'(signed'(d));
        checks++;
        if (val !== want) begin
          failures++;
          $display("FAIL negation d=%0h c=%0d got=%0d want=%0d", d, c, val, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

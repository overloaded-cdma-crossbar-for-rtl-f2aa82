// tb_acdma_channel_adder - checks the pipelined ACDMA channel adder.
//
// Random encoded words and chips are applied every cycle. A reference sum,
// sign-extended words plus chips, is computed in the testbench and queued;
// the adder output must match the queued value exactly log2(N) cycles later,
// which checks both the arithmetic and the pipeline latency. Extreme
// patterns (all words at the most negative and most positive values) are
// mixed in to exercise the width growth, among them every port sending the
// negated most-negative word, the largest value the channel can carry.
module tb_acdma_channel_adder;
  localparam int unsigned N = 8;
  localparam int unsigned W = 7;
  localparam int unsigned L = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][W-1:0]   enc;
  logic [N-1:0]          chip;
  logic signed [W+L:0]   sum;
  int checks = 0, failures = 0;
  longint ref_q [$];

  always #5 clk = ~clk;

  acdma_channel_adder #(.N(N), .W(W)) dut (.clk, .rst_n, .enc_i(enc), .chip_i(chip), .sum_o(sum));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sum(input logic [N-1:0][W-1:0] e, input logic [N-1:0] c);
    longint s = 0;
    for (int i = 0; i < N; i++) begin
      longint v;
      v = longint'(e[i]);
      if (e[i][W-1]) v = v - (longint'(1) << W);
      s += v + longint'(c[i]);
    end
    return s;
  endfunction

  initial begin
    enc  = '0;
    chip = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      // drive on the falling edge so the next rising edge samples it
      @(negedge clk);
      if (t % 50 == 7) begin
        for (int i = 0; i < N; i++) enc[i] = {1'b1, {(W-1){1'b0}}};
        chip = '0;
      end else if (t % 50 == 9) begin
        for (int i = 0; i < N; i++) enc[i] = {1'b0, {(W-1){1'b1}}};
        chip = '1;
      end else begin
        for (int i = 0; i < N; i++) enc[i] = W'($urandom);
        chip = N'($urandom);
      end
      ref_q.push_back(ref_sum(enc, chip));
      if (ref_q.size() > L) begin
        longint exp;
        exp = ref_q.pop_front();
        checks++;
        if (longint'(sum) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d sum=%0d exp=%0d", t, sum, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_acdma_decoder - checks one ACDMA accumulator decoder against ideal
// channel values.
//
// For each frame the testbench draws N random words d_i, builds the channel
// values S_j = sum_i (+/-1)_ij * d_i with the Walsh codes (chip bit 0 = +1,
// 1 = -1) and feeds them, chip by chip, to the decoder of port K together
// with the chip index and port K's despreading chip. After the last chip the
// decoder must show d_K with valid_o high for exactly one cycle, and valid_o
// must stay low in frames where act_i is low. Frames run back to back, so
// the restart of the accumulation on chip 0 is checked too.
module tb_acdma_decoder;
  import cdma_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned W = 7;
  localparam int unsigned L = $clog2(N);
  localparam int unsigned K = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W+L:0]   sum;
  logic                  chip, act, valid;
  logic [L-1:0]          cnt;
  logic [W-1:0]          data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acdma_decoder #(.N(N), .W(W)) dut (.clk, .rst_n, .sum_i(sum), .chip_i(chip), .cnt_i(cnt),
                                     .act_i(act), .data_o(data), .valid_o(valid));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d [N];
    sum = '0; chip = 1'b0; act = 1'b0; cnt = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 500; f++) begin
      logic a;
      a = (f % 4 != 3);
      for (int i = 0; i < N; i++) begin
        d[i] = $urandom_range((1 << W) - 1) - (1 << (W - 1));
        if (f == 1) d[i] = -(1 << (W - 1));   // most negative words
        if (f == 2) d[i] = (1 << (W - 1)) - 1;
      end
      for (int j = 0; j < N; j++) begin
        int s;
        s = 0;
        for (int i = 0; i < N; i++) s += walsh_chip(i, j) ? -d[i] : d[i];
        sum  = (W+L+1)'(s);
        chip = walsh_chip(K, j);
        cnt  = L'(j);
        act  = a;
        @(negedge clk);
        checks++;
        if (j != N - 1 && valid) begin
          failures++;
          $display("FAIL valid high in the middle of frame %0d", f);
        end
      end
      // the edge after chip N-1 has loaded the output
      checks++;
      if (valid !== a) begin
        failures++;
        $display("FAIL frame %0d valid=%0d want %0d", f, valid, a);
      end
      checks++;
      if ($signed(data) != d[K]) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d data=%0d want %0d", f, $signed(data), d[K]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_oci_orth_decoder - checks an orthogonal OCI decoder on an ideal
// channel.
//
// Each frame, every one of the M = 2N-2 ports is randomly active or idle
// and sends a random bit with its own code (Walsh code for ports 0..N-2,
// time slot for the others); idle ports send nothing. The testbench forms
// the channel count of every chip and feeds it, chip by chip, to the
// decoder of orthogonal port K. After the last chip data_o must equal port
// K's bit and valid_o must pulse when act_i was set. Frames where all TDMA
// ports send the bits that push the accumulator hardest against the
// decision are included.
module tb_oci_orth_decoder;
  import cdma_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 2 * N - 2;
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned SW = $clog2(M + 1);
  localparam int unsigned K  = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [SW-1:0] sum;
  logic chip, act, data, valid;
  logic [L-1:0] cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  oci_orth_decoder #(.N(N), .SW(SW)) dut (.clk, .rst_n, .sum_i(sum), .chip_i(chip), .cnt_i(cnt),
                                          .act_i(act), .data_o(data), .valid_o(valid));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit on [M];
    bit d [M];
    sum = '0; chip = 1'b0; cnt = '0; act = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 600; f++) begin
      for (int p = 0; p < M; p++) begin
        on[p] = ($urandom_range(3) != 0);
        d[p]  = 1'($urandom_range(1));
      end
      on[K] = (f % 5 != 4);
      if (f % 6 == 1) begin
        // worst case: TDMA bits set exactly where code K is -1 (or +1)
        for (int p = N - 1; p < M; p++) begin
          on[p] = 1;
          d[p]  = (walsh_chip(K + 1, p - N + 2) == d[K]);
        end
      end
      for (int j = 0; j < N; j++) begin
        int s;
        s = 0;
        for (int p = 0; p < M; p++)
          if (on[p]) s += (oci_mode(p, N) == SPREAD_ORTH) ? ((d[p] ^ oci_chip(p, j, N)) ? 1 : 0)
                                                          : ((d[p] & oci_chip(p, j, N)) ? 1 : 0);
        sum  = SW'(s);
        chip = walsh_chip(K + 1, j);
        cnt  = L'(j);
        act  = on[K];
        @(negedge clk);
      end
      checks++;
      if (valid !== on[K]) begin
        failures++;
        $display("FAIL frame %0d valid", f);
      end
      if (on[K]) begin
        checks++;
        if (data !== d[K]) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d data=%0d want %0d", f, data, d[K]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

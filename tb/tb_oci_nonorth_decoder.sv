// tb_oci_nonorth_decoder - checks a TDMA (overloaded) OCI decoder on an
// ideal channel.
//
// Each frame, every one of the M = 2N-2 ports is randomly active or idle
// and sends a random bit with its own code (Walsh code for ports 0..N-2,
// time slot for the others); idle ports send nothing. The testbench forms
// the channel count of every chip and feeds bit 0 of it, chip by chip, to
// the decoder of TDMA port K (slot K-N+2), together with the XOR of the
// Walsh code indices of the active orthogonal ports. After the last chip
// data_o must equal port K's bit and valid_o must pulse when act_i was set.
// Frames with all ports active and with no orthogonal port active are
// included.
module tb_oci_nonorth_decoder;
  import cdma_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 2 * N - 2;
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned SW = $clog2(M + 1);
  localparam int unsigned K  = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [SW-1:0] sum;
  logic act, data, valid;
  logic [L-1:0] cnt, cx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  oci_nonorth_decoder #(.N(N), .SLOT(K - N + 2)) dut (.clk, .rst_n, .sum_lsb_i(sum[0]), .cnt_i(cnt),
    .code_x_i(cx), .act_i(act), .data_o(data), .valid_o(valid));

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
    sum = '0; cx = '0; cnt = '0; act = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 600; f++) begin
      for (int p = 0; p < M; p++) begin
        on[p] = ($urandom_range(3) != 0);
        d[p]  = 1'($urandom_range(1));
      end
      on[K] = (f % 5 != 4);
      if (f % 6 == 1) for (int p = 0; p < M; p++) on[p] = 1;
      if (f % 6 == 2) for (int p = 0; p < N - 1; p++) on[p] = 0;
      cx = '0;
      for (int p = 0; p < N - 1; p++) if (on[p]) cx ^= L'(p + 1);
      for (int j = 0; j < N; j++) begin
        int s;
        s = 0;
        for (int p = 0; p < M; p++)
          if (on[p]) s += (oci_mode(p, N) == SPREAD_ORTH) ? ((d[p] ^ oci_chip(p, j, N)) ? 1 : 0)
                                                          : ((d[p] & oci_chip(p, j, N)) ? 1 : 0);
        sum  = SW'(s);
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

// tb_poci_nonorth_decoder - checks a parallel TDMA OCI decoder on an ideal
// channel: every cycle all M ports are randomly active with random bits,
// the chip counts are formed in the testbench, bit 0 of the chip-0 count
// and of the count of slot K-N+2 are applied together with the XOR of the
// active Walsh code indices, and one cycle later data_o must equal TDMA
// port K's bit. Frames with all ports and with no orthogonal port active
// are included.
module tb_poci_nonorth_decoder;
  import cdma_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 2 * N - 2;
  localparam int unsigned SW = $clog2(M + 1);
  localparam int unsigned K  = 9;            // TDMA port, slot K-N+2
  localparam int unsigned L  = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][SW-1:0] sums;
  logic act, data, valid;
  logic [L-1:0] cx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  poci_nonorth_decoder #(.N(N), .SLOT(K - N + 2)) dut (.clk, .rst_n, .lsb0_i(sums[0][0]),
    .lsbs_i(sums[K - N + 2][0]), .code_x_i(cx), .act_i(act), .data_o(data), .valid_o(valid));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit on [M];
    bit d [M];
    sums = '0; act = 1'b0; cx = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2000; f++) begin
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
        sums[j] = SW'(s);
      end
      act = on[K];
      @(negedge clk);
      checks++;
      if (valid !== on[K] || (on[K] && data !== d[K])) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d valid=%0d data=%0d want %0d", f, valid, data, d[K]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

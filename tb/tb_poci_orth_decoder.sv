// tb_poci_orth_decoder - checks a parallel orthogonal OCI decoder on an
// ideal channel: every cycle all M ports are randomly active with random
// bits, the N chip counts are formed in the testbench and applied at once,
// and one cycle later data_o must equal the bit of the port whose Walsh
// code the decoder holds. Worst-case TDMA patterns are included.
module tb_poci_orth_decoder;
  import cdma_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 2 * N - 2;
  localparam int unsigned SW = $clog2(M + 1);
  localparam int unsigned K  = 4;            // port K uses Walsh code K+1

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][SW-1:0] sums;
  logic act, data, valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  poci_orth_decoder #(.N(N), .SW(SW), .CODE(K + 1)) dut (.clk, .rst_n, .sums_i(sums), .act_i(act),
                                                         .data_o(data), .valid_o(valid));

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
    sums = '0; act = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2000; f++) begin
      for (int p = 0; p < M; p++) begin
        on[p] = ($urandom_range(3) != 0);
        d[p]  = 1'($urandom_range(1));
      end
      on[K] = (f % 5 != 4);
      if (f % 6 == 1)
        for (int p = N - 1; p < M; p++) begin
          on[p] = 1;
          d[p]  = (walsh_chip(K + 1, p - N + 2) == d[K]);
        end
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

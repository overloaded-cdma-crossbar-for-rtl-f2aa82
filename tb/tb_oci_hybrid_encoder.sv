// tb_oci_hybrid_encoder - exhaustive check of the OCI hybrid encoder: in
// orthogonal mode the output is data XOR chip, in TDMA mode data AND chip.
module tb_oci_hybrid_encoder;
  import cdma_pkg::*;
  logic clk = 1'b0;
  logic d, c, y;
  spread_mode_e m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  oci_hybrid_encoder dut (.data_i(d), .chip_i(c), .mode_i(m), .spread_o(y));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      d = v[0]; c = v[1];
      m = v[2] ? SPREAD_TDMA : SPREAD_ORTH;
      @(posedge clk);
      exp = v[2] ? (v[0] & v[1]) : (v[0] ^ v[1]);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL d=%0d c=%0d mode=%0d y=%0d", d, c, v[2], y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

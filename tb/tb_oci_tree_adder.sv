// tb_oci_tree_adder - the OCI tree adder must output the number of ones
// among its M inputs, exactly ceil(log2 M)+1 cycles after they are applied
// (input register plus one register per tree stage). Random patterns with
// varying density, including all ones, are applied every cycle.
module tb_oci_tree_adder;
  localparam int unsigned M = 14;
  localparam int unsigned S = $clog2(M);
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] bits;
  logic [$clog2(M + 1)-1:0] sum;
  int checks = 0, failures = 0;
  int q [$];

  always #5 clk = ~clk;

  oci_tree_adder #(.M(M)) dut (.clk, .rst_n, .bits_i(bits), .sum_o(sum));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      case (t % 4)
        0: bits = M'($urandom);
        1: bits = M'($urandom) & M'($urandom);
        2: bits = M'($urandom) | M'($urandom);
        default: bits = (t % 40 == 3) ? '1 : M'($urandom);
      endcase
      q.push_back($countones(bits));
      if (q.size() > S + 1) begin
        int e;
        e = q.pop_front();
        checks++;
        if (int'(sum) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d sum=%0d want %0d", t, sum, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

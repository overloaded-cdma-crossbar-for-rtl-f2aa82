// tb_poci_arbiter - checks the per-cycle arbitration and code assignment of
// the parallel OCI arbiter.
//
// Random requests with random destinations 0..M-1 are held until granted.
// Every cycle the testbench checks that grants go only to requesting ports,
// at most one per destination and at least one for every requested
// destination; that in the next cycle a granted port gets all N chips and
// the mode of its destination's code and an idle port zeros in orthogonal
// mode; that the "addressed" flags and code_x come out D cycles later; and
// that no request waits more than M cycles.
module tb_poci_arbiter;
  import cdma_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned D  = 5;
  localparam int unsigned M  = 2 * N - 2;
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned PW = $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0]         req, grant, dec_act;
  logic [M-1:0][N-1:0]  chips;
  spread_mode_e [M-1:0] mode;
  logic [M-1:0][PW-1:0] dest;
  logic [L-1:0]         dec_cx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  poci_arbiter #(.N(N), .D(D)) dut (.clk, .rst_n, .tx_req_i(req), .tx_dest_i(dest), .tx_grant_o(grant),
    .enc_chips_o(chips), .enc_mode_o(mode), .dec_act_o(dec_act), .dec_code_x_o(dec_cx));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t %s", $time, msg);
    end
  endtask

  initial begin
    logic [M-1:0]         pg;           // grants of the previous cycle
    logic [M-1:0][PW-1:0] pd;
    logic [M-1:0]         act_h [$];
    logic [L-1:0]         cx_h [$];
    int                   wait_c [M];
    req = '0; dest = '0; pg = '0; pd = '0;
    foreach (wait_c[i]) wait_c[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      logic [M-1:0] rxa, want, got;
      logic [L-1:0] cx;
      for (int i = 0; i < M; i++)
        if (!req[i] && ($urandom_range(3) != 0)) begin
          req[i]  = 1'b1;
          dest[i] = ((t / 500) % 2 == 1) ? PW'(10) : PW'($urandom_range(M - 1));
        end
      #1;
      rxa = '0; cx = '0;
      for (int i = 0; i < M; i++) begin
        if (pg[i]) begin
          for (int j = 0; j < N; j++)
            chk(chips[i][j] == oci_chip(pd[i], j, N), "encoder chips");
          chk(mode[i] == ((pd[i] < N - 1) ? SPREAD_ORTH : SPREAD_TDMA), "encoder mode");
          rxa[pd[i]] = 1'b1;
          if (pd[i] < N - 1) cx ^= L'(pd[i] + 1);
        end else chk(chips[i] == '0 && mode[i] == SPREAD_ORTH, "idle port");
      end
      act_h.push_back(rxa); cx_h.push_back(cx);
      if (act_h.size() > D) begin
        logic [M-1:0] a;
        logic [L-1:0] c;
        a = act_h.pop_front(); c = cx_h.pop_front();
        chk(dec_act == a, "addressed flags delay");
        chk(dec_cx == c, "code_x delay");
      end
      want = '0; got = '0;
      for (int i = 0; i < M; i++) begin
        if (req[i]) want[dest[i]] = 1'b1;
        if (grant[i]) begin
          chk(req[i], "grant without request");
          chk(!got[dest[i]], "two grants for one destination");
          got[dest[i]] = 1'b1;
        end
      end
      chk(got == want, "a requested destination got no grant");
      for (int i = 0; i < M; i++) begin
        if (req[i] && !grant[i]) begin
          wait_c[i]++;
          chk(wait_c[i] <= M, "request starved");
        end else wait_c[i] = 0;
      end
      pg = grant;
      pd = dest;
      @(posedge clk);
      #1;
      req = req & ~pg;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

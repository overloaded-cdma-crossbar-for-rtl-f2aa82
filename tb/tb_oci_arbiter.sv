// tb_oci_arbiter - checks chip counting, arbitration and code assignment of
// the OCI arbiter.
//
// Random requests with random destinations 0..M-1 are held until granted.
// The testbench checks that grants come only in the last chip of a frame,
// only to requesting ports, at most one per destination and at least one
// for every requested destination; that in the following frame a granted
// port uses its destination's chip and mode (Walsh/XOR for ports 0..N-2,
// slot/AND for the others) and an idle port chip 0 in orthogonal mode; that
// the decoder counter, "addressed" flags and code_x (the XOR of the Walsh
// code indices in use) are the encoder-side values delayed by D cycles; and
// that no request waits more than M frames.
module tb_oci_arbiter;
  import cdma_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned D  = 5;
  localparam int unsigned M  = 2 * N - 2;
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned PW = $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0]         req, grant, enc_chip, dec_act;
  spread_mode_e [M-1:0] enc_mode;
  logic [M-1:0][PW-1:0] dest;
  logic [L-1:0]         cnt, dec_cnt, dec_cx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  oci_arbiter #(.N(N), .D(D)) dut (.clk, .rst_n, .tx_req_i(req), .tx_dest_i(dest), .tx_grant_o(grant),
    .cnt_o(cnt), .enc_chip_o(enc_chip), .enc_mode_o(enc_mode), .dec_cnt_o(dec_cnt),
    .dec_act_o(dec_act), .dec_code_x_o(dec_cx));

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
    logic [M-1:0]         fr_act;
    logic [M-1:0][PW-1:0] fr_dest;
    logic [L-1:0]         cnt_h [$], cx_h [$];
    logic [M-1:0]         act_h [$];
    int                   wait_fr [M];
    int                   exp_cnt;
    req = '0; dest = '0; fr_act = '0; fr_dest = '0; exp_cnt = 0;
    foreach (wait_fr[i]) wait_fr[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8000; t++) begin
      logic [M-1:0] rxa;
      logic [L-1:0] cx;
      for (int i = 0; i < M; i++)
        if (!req[i] && ($urandom_range(3) != 0)) begin
          req[i]  = 1'b1;
          dest[i] = ((t / 1000) % 2 == 1) ? PW'(9) : PW'($urandom_range(M - 1));
        end
      #1;
      chk(cnt == L'(exp_cnt), "chip counter");
      rxa = '0; cx = '0;
      for (int i = 0; i < M; i++) begin
        if (fr_act[i]) begin
          chk(enc_chip[i] == oci_chip(fr_dest[i], cnt, N), "encoder chip");
          chk(enc_mode[i] == ((fr_dest[i] < N - 1) ? SPREAD_ORTH : SPREAD_TDMA), "encoder mode");
          rxa[fr_dest[i]] = 1'b1;
          if (fr_dest[i] < N - 1) cx ^= L'(fr_dest[i] + 1);
        end else chk(enc_chip[i] == 1'b0 && enc_mode[i] == SPREAD_ORTH, "idle port");
      end
      cnt_h.push_back(cnt); act_h.push_back(rxa); cx_h.push_back(cx);
      if (cnt_h.size() > D) begin
        logic [L-1:0] a, c;
        logic [M-1:0] b;
        a = cnt_h.pop_front(); b = act_h.pop_front(); c = cx_h.pop_front();
        chk(dec_cnt == a, "decoder counter delay");
        chk(dec_act == b, "decoder active flags delay");
        chk(dec_cx == c, "decoder code_x delay");
      end
      if (cnt != L'(N - 1)) chk(grant == '0, "grant outside the last chip");
      else begin
        logic [M-1:0] want, got;
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
            wait_fr[i]++;
            chk(wait_fr[i] <= M, "request starved");
          end else wait_fr[i] = 0;
        end
      end
      @(posedge clk);
      if (exp_cnt == N - 1) begin
        fr_act  = grant;
        fr_dest = dest;
      end
      #1;
      req = req & ~grant;
      exp_cnt = (exp_cnt + 1) % N;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_acdma_controller - checks chip counting, arbitration and code
// assignment of the ACDMA controller.
//
// Random requests with random destinations are held until granted. The
// testbench checks that grants come only in the last cycle of a frame, only
// to requesting ports, at most one per destination and at least one for
// every requested destination; that in the following frame each granted
// port's chip is chip cnt of its destination's Walsh code and idle ports
// send chip 0; that the decoder counter, chips and "addressed" flags are
// the encoder-side values delayed by log2(N) cycles; and that no request
// waits more than N frames.
module tb_acdma_controller;
  import cdma_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned L = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        req, grant, enc_chip, dec_chip, dec_act;
  logic [N-1:0][L-1:0] dest;
  logic [L-1:0]        cnt, dec_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acdma_controller #(.N(N)) dut (.clk, .rst_n, .tx_req_i(req), .tx_dest_i(dest), .tx_grant_o(grant),
    .cnt_o(cnt), .enc_chip_o(enc_chip), .dec_cnt_o(dec_cnt), .dec_chip_o(dec_chip), .dec_act_o(dec_act));

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
    logic [N-1:0]        fr_act;          // ports sending in the current frame
    logic [N-1:0][L-1:0] fr_dest;
    logic [L-1:0]        cnt_hist [$];
    logic [N-1:0]        act_hist [$];
    int                  wait_fr [N];
    int                  exp_cnt;
    req = '0; dest = '0; fr_act = '0; fr_dest = '0; exp_cnt = 0;
    foreach (wait_fr[i]) wait_fr[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8000; t++) begin
      logic [N-1:0] rxa;
      // new requests where the port is idle; hot-spot traffic in some phases
      for (int i = 0; i < N; i++)
        if (!req[i] && ($urandom_range(3) != 0)) begin
          req[i]  = 1'b1;
          dest[i] = ((t / 1000) % 2 == 1) ? L'(3) : L'($urandom);
        end
      #1;
      chk(cnt == L'(exp_cnt), "chip counter");
      // encoder chips of the current frame
      for (int i = 0; i < N; i++)
        chk(enc_chip[i] == (fr_act[i] ? walsh_chip(fr_dest[i], cnt) : 1'b0), "encoder chip");
      rxa = '0;
      for (int i = 0; i < N; i++) if (fr_act[i]) rxa[fr_dest[i]] = 1'b1;
      cnt_hist.push_back(cnt);
      act_hist.push_back(rxa);
      if (cnt_hist.size() > L) begin
        logic [L-1:0] dc;
        logic [N-1:0] da;
        dc = cnt_hist.pop_front();
        da = act_hist.pop_front();
        chk(dec_cnt == dc, "decoder counter delay");
        chk(dec_act == da, "decoder active flags delay");
        for (int k = 0; k < N; k++) chk(dec_chip[k] == walsh_chip(k, dc), "decoder chip");
      end
      // arbitration
      if (cnt != L'(N - 1)) chk(grant == '0, "grant outside the last chip");
      else begin
        logic [N-1:0] want, got;
        want = '0; got = '0;
        for (int i = 0; i < N; i++) begin
          if (req[i]) want[dest[i]] = 1'b1;
          if (grant[i]) begin
            chk(req[i], "grant without request");
            chk(!got[dest[i]], "two grants for one destination");
            got[dest[i]] = 1'b1;
          end
        end
        chk(got == want, "a requested destination got no grant");
        for (int i = 0; i < N; i++) begin
          if (req[i] && !grant[i]) begin
            wait_fr[i]++;
            chk(wait_fr[i] <= N, "request starved");
          end else wait_fr[i] = 0;
        end
      end
      @(posedge clk);
      if (cnt_hist.size() > 0 && exp_cnt == N - 1) begin
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

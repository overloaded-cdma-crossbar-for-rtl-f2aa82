// tb_noc_cdma_top - end-to-end test of noc_cdma_top at its default sizes
// (ACDMA: N = 8 ports, W = 7-bit words; OCI: codes of length 8, 14 ports,
// 8-bit words; router: 128-byte FIFOs).
//
// Four independent traffic generators run in parallel. The OCI side works
// like the crossbar side below, with 14 ports, latency N+ceil(log2 14)+2,
// and counts overloaded frames (more words than chips), TDMA-port deliveries
// and orthogonal-port deliveries. The P-OCI side does the same for the
// parallel overloaded crossbar (latency ceil(log2 14)+3, a new grant every
// cycle) and also counts cycles where several ports ask for one RX port. The crossbar side
// sends random words from all TX ports to random, hot-spot and permutation
// destinations and checks every delivered word and its latency of
// N+log2(N)+1 cycles against a per-RX scoreboard. The router side sends
// random packets, reads its outputs at varying rates and checks every byte
// and the parity-error flag. Each mechanism of the design is counted and
// must occur at least once: crossbar contention for an RX port, a fully
// loaded crossbar frame, most-negative words, router suspension on a full
// FIFO, a parity error, a dropped packet to the missing port, an empty
// (zero-length) packet, a longest (63-byte payload) packet, and an output
// holding back an incomplete packet (store-and-forward).
module tb_noc_cdma_top;
  localparam int unsigned N = 8;
  localparam int unsigned W = 7;
  localparam int unsigned L = $clog2(N);
  localparam int unsigned LAT = N + L + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        tx_valid, tx_ready, rx_valid;
  logic [N-1:0][L-1:0] tx_dest;
  logic [N-1:0][W-1:0] tx_data, rx_data;
  logic [7:0]          rt_data;
  logic                rt_packet_valid, rt_suspend_data, rt_err;
  logic [2:0][7:0]     rt_data_out;
  logic [2:0]          rt_vld_out, rt_read_enb;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  noc_cdma_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  // ---------------- crossbar side ----------------
  typedef struct { logic [W-1:0] data; longint t; } item_t;
  item_t sb [N][$];
  int n_contention = 0, n_full = 0, n_negmax = 0, n_words = 0, n_sent = 0;

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) if (rx_valid[k]) begin
      chk(sb[k].size() > 0, $sformatf("unexpected word at RX %0d", k));
      if (sb[k].size() > 0) begin
        item_t it;
        it = sb[k].pop_front();
        chk(rx_data[k] == it.data, $sformatf("RX %0d data %0h want %0h", k, rx_data[k], it.data));
        chk(cyc - it.t == longint'(LAT), $sformatf("RX %0d latency %0d", k, cyc - it.t));
        n_words++;
      end
    end
  end

  task automatic xbar_traffic();
    for (int t = 0; t < 5000; t++) begin
      int phase;
      phase = (t < 2000) ? 0 : (t < 3000) ? 1 : (t < 3200) ? 3 : 2;
      for (int i = 0; i < N; i++)
        if (phase != 3 && !tx_valid[i] && (phase == 2 || $urandom_range(2) != 0)) begin
          tx_valid[i] = 1'b1;
          tx_dest[i]  = (phase == 0) ? L'($urandom) : (phase == 1) ? L'(5) : L'(i + t / N);
          tx_data[i]  = ($urandom_range(7) == 0) ? {1'b1, {(W-1){1'b0}}} : W'($urandom);
        end
      #1;
      if (tx_ready != '0) begin
        logic [N-1:0] seen;
        int n;
        seen = '0; n = 0;
        for (int i = 0; i < N; i++) begin
          if (tx_valid[i] && seen[tx_dest[i]]) n_contention++;
          if (tx_valid[i]) seen[tx_dest[i]] = 1'b1;
          if (tx_ready[i]) begin
            item_t it;
            it.data = tx_data[i];
            it.t    = cyc;
            sb[tx_dest[i]].push_back(it);
            if (tx_data[i] == {1'b1, {(W-1){1'b0}}}) n_negmax++;
            n++;
            n_sent++;
          end
        end
        if (n == N) n_full++;
      end
      @(posedge clk);
      #1;
      tx_valid = tx_valid & ~tx_ready;
      @(negedge clk);
    end
    tx_valid = '0;
    repeat (3 * LAT) @(negedge clk);
  endtask

  // ---------------- OCI side ----------------
  localparam int unsigned ON  = 8;
  localparam int unsigned OM  = 2 * ON - 2;
  localparam int unsigned OPW = $clog2(OM);
  localparam int unsigned OA  = 8;
  localparam int unsigned OLAT = ON + $clog2(OM) + 2;
  logic [OM-1:0]          oci_tx_valid, oci_tx_ready, oci_rx_valid;
  logic [OM-1:0][OPW-1:0] oci_tx_dest;
  logic [OM-1:0][OA-1:0]  oci_tx_data, oci_rx_data;
  typedef struct { logic [OA-1:0] data; longint t; } oitem_t;
  oitem_t osb [OM][$];
  int o_over = 0, o_tdma = 0, o_orth = 0, o_sent = 0, o_words = 0;

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < OM; k++) if (oci_rx_valid[k]) begin
      chk(osb[k].size() > 0, $sformatf("unexpected OCI word at RX %0d", k));
      if (osb[k].size() > 0) begin
        oitem_t it;
        it = osb[k].pop_front();
        chk(oci_rx_data[k] == it.data, $sformatf("OCI RX %0d data %0h want %0h", k, oci_rx_data[k], it.data));
        chk(cyc - it.t == longint'(OLAT), $sformatf("OCI RX %0d latency %0d", k, cyc - it.t));
        if (k < ON - 1) o_orth++; else o_tdma++;
        o_words++;
      end
    end
  end

  task automatic oci_traffic();
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < OM; i++)
        if (!oci_tx_valid[i] && $urandom_range(3) != 0) begin
          oci_tx_valid[i] = 1'b1;
          oci_tx_dest[i]  = (t < 2000) ? OPW'($urandom_range(OM - 1)) : OPW'((i + t / ON) % OM);
          oci_tx_data[i]  = OA'($urandom);
        end
      #1;
      if (oci_tx_ready != '0) begin
        int n;
        n = 0;
        for (int i = 0; i < OM; i++) if (oci_tx_ready[i]) begin
          oitem_t it;
          it.data = oci_tx_data[i];
          it.t    = cyc;
          osb[oci_tx_dest[i]].push_back(it);
          n++;
          o_sent++;
        end
        if (n > ON) o_over++;
      end
      @(posedge clk);
      #1;
      oci_tx_valid = oci_tx_valid & ~oci_tx_ready;
      @(negedge clk);
    end
    oci_tx_valid = '0;
    repeat (3 * OLAT) @(negedge clk);
  endtask

  // ---------------- P-OCI side ----------------
  localparam int unsigned PLAT = $clog2(OM) + 3;
  logic [OM-1:0]          poci_tx_valid, poci_tx_ready, poci_rx_valid;
  logic [OM-1:0][OPW-1:0] poci_tx_dest;
  logic [OM-1:0][OA-1:0]  poci_tx_data, poci_rx_data;
  oitem_t psb [OM][$];
  int p_over = 0, p_tdma = 0, p_orth = 0, p_sent = 0, p_words = 0, p_cont = 0;

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < OM; k++) if (poci_rx_valid[k]) begin
      chk(psb[k].size() > 0, $sformatf("unexpected P-OCI word at RX %0d", k));
      if (psb[k].size() > 0) begin
        oitem_t it;
        it = psb[k].pop_front();
        chk(poci_rx_data[k] == it.data, $sformatf("P-OCI RX %0d data %0h want %0h", k, poci_rx_data[k], it.data));
        chk(cyc - it.t == longint'(PLAT), $sformatf("P-OCI RX %0d latency %0d", k, cyc - it.t));
        if (k < ON - 1) p_orth++; else p_tdma++;
        p_words++;
      end
    end
  end

  task automatic poci_traffic();
    for (int t = 0; t < 4000; t++) begin
      logic [OM-1:0] seen;
      int n;
      for (int i = 0; i < OM; i++)
        if (!poci_tx_valid[i] && $urandom_range(3) != 0) begin
          poci_tx_valid[i] = 1'b1;
          poci_tx_dest[i]  = (t < 2000) ? OPW'($urandom_range(OM - 1)) : OPW'((i + t) % OM);
          poci_tx_data[i]  = OA'($urandom);
        end
      #1;
      seen = '0;
      for (int i = 0; i < OM; i++) if (poci_tx_valid[i]) begin
        if (seen[poci_tx_dest[i]]) begin
          p_cont++;
          break;
        end
        seen[poci_tx_dest[i]] = 1'b1;
      end
      n = 0;
      for (int i = 0; i < OM; i++) if (poci_tx_ready[i]) begin
        oitem_t it;
        it.data = poci_tx_data[i];
        it.t    = cyc;
        psb[poci_tx_dest[i]].push_back(it);
        n++;
        p_sent++;
      end
      if (n > ON) p_over++;
      @(posedge clk);
      #1;
      poci_tx_valid = poci_tx_valid & ~poci_tx_ready;
      @(negedge clk);
    end
    poci_tx_valid = '0;
    repeat (3 * PLAT) @(negedge clk);
  endtask

  // ---------------- router side ----------------
  logic [8:0] rq [3][$];          // {last byte of its packet, byte}
  int rpk [3] = '{0, 0, 0};       // complete packets per output
  int rd_pct = 50;
  int n_susp = 0, n_err = 0, n_drop = 0, n_empty = 0, n_bytes = 0, n_hold = 0, n_long = 0;

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < 3; p++) begin
      chk(rt_vld_out[p] == (rpk[p] != 0), $sformatf("vld_out_%0d", p));
      if (rq[p].size() != 0 && rpk[p] == 0) n_hold++;
      rt_read_enb[p] = ($urandom_range(99) < rd_pct);
      if (rt_read_enb[p] && rt_vld_out[p] && rpk[p] != 0) begin
        chk(rt_data_out[p] == rq[p][0][7:0], $sformatf("router port %0d byte", p));
        if (rq[p][0][8]) rpk[p]--;
        void'(rq[p].pop_front());
        n_bytes++;
      end
    end
  end

  task automatic rt_send(input logic [7:0] b, input logic [1:0] dst, input bit last);
    rt_packet_valid = 1'b1;
    rt_data = b;
    #2;
    while (rt_suspend_data) begin
      n_susp++;
      @(negedge clk);
      #2;
    end
    @(posedge clk);
    if (dst != 2'd3) begin
      rq[dst].push_back({last, b});
      if (last) rpk[dst]++;
    end
    @(negedge clk);
    #1;
  endtask

  task automatic router_traffic();
    for (int p = 0; p < 200; p++) begin
      logic [7:0] h, par;
      bit wrong;
      rd_pct = ((p / 40) % 2 == 0) ? 60 : 5;
      h = {6'($urandom_range(40)), 2'($urandom)};
      if (p % 7 == 0) h[7:2] = '0;
      if (p % 11 == 5) h[7:2] = 6'd63;
      if (h[7:2] == 0) n_empty++;
      if (h[7:2] == 6'd63 && h[1:0] != 2'd3) n_long++;
      if (h[1:0] == 2'd3) n_drop++;
      par = h;
      rt_send(h, h[1:0], 1'b0);
      for (int i = 0; i < h[7:2]; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        par ^= b;
        rt_send(b, h[1:0], 1'b0);
      end
      wrong = ($urandom_range(4) == 0);
      rt_send(wrong ? ~par : par, h[1:0], 1'b1);
      rt_packet_valid = 1'b0;
      chk(rt_err == wrong, $sformatf("router packet %0d err", p));
      if (rt_err) n_err++;
      repeat ($urandom_range(3)) @(negedge clk);
      #1;
    end
    rd_pct = 100;
    repeat (200) @(negedge clk);
  endtask

  initial begin
    tx_valid = '0; tx_dest = '0; tx_data = '0;
    rt_data = '0; rt_packet_valid = 1'b0; rt_read_enb = '0;
    oci_tx_valid = '0; oci_tx_dest = '0; oci_tx_data = '0;
    poci_tx_valid = '0; poci_tx_dest = '0; poci_tx_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    fork
      xbar_traffic();
      router_traffic();
      oci_traffic();
      poci_traffic();
    join
    for (int k = 0; k < OM; k++) chk(psb[k].size() == 0, $sformatf("P-OCI RX %0d missing words", k));
    chk(p_words == p_sent && p_sent > 0, "P-OCI words lost");
    chk(p_over > 0, "mechanism never happened: overloaded P-OCI cycle");
    chk(p_cont > 0, "mechanism never happened: P-OCI contention");
    chk(p_tdma > 0, "mechanism never happened: P-OCI TDMA-port delivery");
    chk(p_orth > 0, "mechanism never happened: P-OCI orthogonal-port delivery");
    for (int k = 0; k < OM; k++) chk(osb[k].size() == 0, $sformatf("OCI RX %0d missing words", k));
    chk(o_words == o_sent && o_sent > 0, "OCI words lost");
    chk(o_over > 0, "mechanism never happened: overloaded OCI frame");
    chk(o_tdma > 0, "mechanism never happened: OCI TDMA-port delivery");
    chk(o_orth > 0, "mechanism never happened: OCI orthogonal-port delivery");
    for (int k = 0; k < N; k++) chk(sb[k].size() == 0, $sformatf("RX %0d missing words", k));
    for (int p = 0; p < 3; p++) chk(rq[p].size() == 0, $sformatf("router port %0d bytes left", p));
    chk(n_words == n_sent && n_sent > 0, "crossbar words lost");
    chk(n_contention > 0, "mechanism never happened: crossbar contention");
    chk(n_full > 0,       "mechanism never happened: fully loaded frame");
    chk(n_negmax > 0,     "mechanism never happened: most-negative word");
    chk(n_susp > 0,       "mechanism never happened: router suspend");
    chk(n_err > 0,        "mechanism never happened: parity error");
    chk(n_drop > 0,       "mechanism never happened: dropped packet");
    chk(n_empty > 0,      "mechanism never happened: empty packet");
    chk(n_long > 0,       "mechanism never happened: longest packet");
    chk(n_hold > 0,       "mechanism never happened: store-and-forward hold");
    $display("crossbar: words=%0d contention=%0d full_frames=%0d negmax=%0d", n_words, n_contention, n_full, n_negmax);
    $display("oci: words=%0d overloaded_frames=%0d orth=%0d tdma=%0d", o_words, o_over, o_orth, o_tdma);
    $display("poci: words=%0d overloaded_cycles=%0d contention=%0d orth=%0d tdma=%0d", p_words, p_over, p_cont, p_orth, p_tdma);
    $display("router: bytes=%0d suspends=%0d parity_errors=%0d drops=%0d empty=%0d longest=%0d holds=%0d",
             n_bytes, n_susp, n_err, n_drop, n_empty, n_long, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

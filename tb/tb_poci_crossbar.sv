// tb_poci_crossbar - end-to-end test of the parallel overloaded (P-OCI)
// crossbar.
//
// Every one of the M = 2N-2 TX ports offers random A-bit words to random RX
// ports, orthogonal and TDMA alike, and holds each request until tx_ready. A
// scoreboard per RX port records each accepted word with the cycle it was
// accepted; every rx_valid pulse must deliver the oldest recorded word of
// that port, unchanged, exactly ceil(log2 M)+3 cycles after acceptance
// (TX register, the adder's input register and tree stages, and the decoder
// register); grants come every cycle. Phases of uniform, hot-spot and
// permutation traffic make contention (several ports asking for one RX
// port in a cycle) and fully loaded cycles (all M ports sending at once)
// happen; both are counted and must occur. Bandwidth is checked in the
// permutation phase: M words per cycle.
module tb_poci_crossbar;
  localparam int unsigned NC = 8;               // code length
  localparam int unsigned W  = 8;               // word width (bit slices)
  localparam int unsigned N  = 2 * NC - 2;      // ports
  localparam int unsigned L  = $clog2(N);       // destination index width
  localparam int unsigned LAT = $clog2(N) + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        tx_valid, tx_ready, rx_valid;
  logic [N-1:0][L-1:0] tx_dest;
  logic [N-1:0][W-1:0] tx_data, rx_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  poci_crossbar #(.N(NC), .A(W)) dut (.clk, .rst_n, .tx_valid_i(tx_valid), .tx_dest_i(tx_dest),
    .tx_data_i(tx_data), .tx_ready_o(tx_ready), .rx_valid_o(rx_valid), .rx_data_o(rx_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [W-1:0] data; longint t; } item_t;
  item_t sb [N][$];
  int contention = 0, full_cycles = 0, delivered = 0, sent = 0, perm_cycles = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  // receive side
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) if (rx_valid[k]) begin
      chk(sb[k].size() > 0, $sformatf("unexpected word at RX %0d", k));
      if (sb[k].size() > 0) begin
        item_t it;
        it = sb[k].pop_front();
        chk(rx_data[k] == it.data, $sformatf("RX %0d data %0h want %0h", k, rx_data[k], it.data));
        chk(cyc - it.t == longint'(LAT), $sformatf("RX %0d latency %0d want %0d", k, cyc - it.t, LAT));
        delivered++;
      end
    end
  end

  task automatic new_req(input int i, input int phase, input int t);
    tx_valid[i] = 1'b1;
    case (phase)
      0: tx_dest[i] = L'($urandom_range(N - 1));
      1: tx_dest[i] = L'(2);                          // hot spot
      default: tx_dest[i] = L'((i + t / NC) % N);      // rotating permutation
    endcase
    tx_data[i] = W'($urandom);
    if ($urandom_range(9) == 0) tx_data[i] = (i % 2 == 0) ? '1 : '0;  // all-ones / all-zeros words
  endtask

  initial begin
    tx_valid = '0; tx_dest = '0; tx_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      int phase;
      phase = (t < 2000) ? 0 : (t < 3000) ? 1 : (t < 3200) ? 3 : 2;  // 3: drain
      for (int i = 0; i < N; i++)
        if (phase != 3 && !tx_valid[i] && (phase == 2 || $urandom_range(2) != 0)) new_req(i, phase, t);
      #1;
      if (tx_ready != '0) begin
        logic [N-1:0] seen;
        int n;
        seen = '0; n = 0;
        for (int i = 0; i < N; i++) begin
          if (tx_valid[i] && seen[tx_dest[i]]) contention++;
          if (tx_valid[i]) seen[tx_dest[i]] = 1'b1;
          if (tx_ready[i]) begin
            item_t it;
            chk(tx_valid[i], "ready without valid");
            it.data = tx_data[i];
            it.t    = cyc;
            sb[tx_dest[i]].push_back(it);
            n++;
            sent++;
          end
        end
        if (n == N) full_cycles++;
        if (phase == 2 && t > 3200 + 2 * NC) begin
          chk(n == N, "permutation traffic did not use all ports");
          perm_cycles++;
        end
      end
      @(posedge clk);
      #1;
      tx_valid = tx_valid & ~tx_ready;
      @(negedge clk);
    end
    tx_valid = '0;
    repeat (3 * LAT) @(negedge clk);
    for (int k = 0; k < N; k++) chk(sb[k].size() == 0, $sformatf("RX %0d missing words", k));
    chk(delivered == sent && sent > 0, "words lost");
    chk(contention > 0, "no contention happened");
    chk(full_cycles > 0, "no fully loaded cycle happened");
    $display("sent=%0d delivered=%0d contention=%0d full_cycles=%0d perm_cycles=%0d",
             sent, delivered, contention, full_cycles, perm_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

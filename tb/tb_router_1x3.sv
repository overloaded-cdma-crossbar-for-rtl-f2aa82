// tb_router_1x3 - end-to-end test of the 1x3 packet router.
//
// A source sends random packets (header with destination 0..3 and length
// 0..40, sometimes the maximum 63, payload, parity byte that is correct or
// deliberately wrong) and
// holds each byte while suspend_data is high. Three receivers read their
// outputs at random rates, slowly in some phases so that FIFOs fill up and
// the router must suspend the source. Per output, a reference queue holds
// every byte of the packets bound for it; each byte read must be the next
// one in that queue. An output must show vld_out exactly while its queue
// holds a complete packet (store-and-forward); cycles in which bytes are
// stored but held back are counted and must occur. err must go high exactly after packets with a wrong parity byte.
// Packets to destination 3 must vanish. The counts of suspensions, parity
// errors and dropped packets must all be non-zero.
module tb_router_1x3;
  logic clock = 1'b0, reset = 1'b1;
  logic [7:0] data, d0, d1, d2;
  logic packet_valid, suspend_data, err, v0, v1, v2, r0, r1, r2;
  int checks = 0, failures = 0, suspends = 0, errs = 0, drops = 0, bytes_rx = 0;
  logic [8:0] q [3][$];          // {last byte of its packet, byte}
  int pk [3] = '{0, 0, 0};        // complete packets per output
  int holds = 0;

  always #5 clock = ~clock;

  router_1x3 dut (.clock, .reset, .data, .packet_valid, .suspend_data, .err,
    .data_out_0(d0), .data_out_1(d1), .data_out_2(d2), .vld_out_0(v0), .vld_out_1(v1),
    .vld_out_2(v2), .read_enb_0(r0), .read_enb_1(r1), .read_enb_2(r2));

  initial begin
    repeat (300000) @(posedge clock);
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

  int rd_pct = 50;

  // receivers: decide at the negative edge, check what is popped
  always @(negedge clock) if (!reset) begin
    logic [2:0] v, r;
    logic [7:0] d [3];
    v = {v2, v1, v0};
    d[0] = d0; d[1] = d1; d[2] = d2;
    for (int p = 0; p < 3; p++) begin
      chk(v[p] == (pk[p] != 0), $sformatf("vld_out_%0d", p));
      if (q[p].size() != 0 && pk[p] == 0) holds++;
      r[p] = ($urandom_range(99) < rd_pct);
      if (r[p] && v[p] && pk[p] != 0) begin
        chk(d[p] == q[p][0][7:0], $sformatf("data_out_%0d %0h want %0h", p, d[p], q[p][0][7:0]));
        if (q[p][0][8]) pk[p]--;
        void'(q[p].pop_front());
        bytes_rx++;
      end
    end
    {r2, r1, r0} = r;
  end

  // send one byte, holding it while suspended; the byte enters the
  // reference queue on the edge that accepts it
  task automatic send(input logic [7:0] b, input logic [1:0] dst, input bit last);
    packet_valid = 1'b1;
    data = b;
    #2;
    while (suspend_data) begin
      suspends++;
      @(negedge clock);
      #2;
    end
    @(posedge clock);
    if (dst != 2'd3) begin
      q[dst].push_back({last, b});
      if (last) pk[dst]++;
    end
    @(negedge clock);
    #1;
  endtask

  initial begin
    data = '0; packet_valid = 1'b0; {r2, r1, r0} = '0;
    repeat (3) @(posedge clock);
    @(negedge clock);
    #1;
    reset = 1'b0;
    for (int p = 0; p < 300; p++) begin
      logic [7:0] h, par;
      bit wrong;
      rd_pct = ((p / 50) % 2 == 0) ? 60 : 5;
      h = {6'($urandom_range(40)), 2'($urandom)};
      if (p % 7 == 0) h[7:2] = '0;
      if (p % 11 == 5) h[7:2] = 6'd63;
      if (h[1:0] == 2'd3) drops++;
      par = h;
      send(h, h[1:0], 1'b0);
      for (int i = 0; i < h[7:2]; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        par ^= b;
        send(b, h[1:0], 1'b0);
      end
      wrong = ($urandom_range(4) == 0);
      send(wrong ? ~par : par, h[1:0], 1'b1);
      packet_valid = 1'b0;
      chk(err == wrong, $sformatf("packet %0d err=%0d want %0d", p, err, wrong));
      if (err) errs++;
      repeat ($urandom_range(3)) @(negedge clock);
      #1;
    end
    rd_pct = 100;
    repeat (200) @(negedge clock);
    for (int p = 0; p < 3; p++) chk(q[p].size() == 0, $sformatf("bytes left for port %0d", p));
    chk(suspends > 0, "suspend_data never raised");
    chk(errs > 0, "no parity error flagged");
    chk(drops > 0, "no packet to the missing port");
    chk(holds > 0, "no incomplete packet was ever held back");
    $display("bytes=%0d suspends=%0d errs=%0d drops=%0d holds=%0d", bytes_rx, suspends, errs, drops, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

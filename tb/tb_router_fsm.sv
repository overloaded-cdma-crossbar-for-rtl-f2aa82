// tb_router_fsm - checks the packet-steering controller of the 1x3 router.
//
// The testbench plays the source and the rest of the router: it presents
// packets (header, payload, parity) with gaps, keeps its own copy of the
// latched destination, and drives the three FIFO-full flags at random. For
// every cycle it checks that suspend_data equals the full flag of the port
// the current byte is bound for, that a byte is written into exactly that
// FIFO when accepted (and nowhere for destination 3), and that the header,
// payload and parity strobes come in the order and number the header's
// length field calls for.
module tb_router_fsm;
  logic clock = 1'b0, reset = 1'b1;
  logic packet_valid, suspend_data, hdr_ld, pay_ld, par_ld;
  logic [7:0] data;
  logic [1:0] dest_q;
  logic [2:0] fifo_full, we;
  int checks = 0, failures = 0, suspends = 0, drops = 0;

  always #5 clock = ~clock;

  router_fsm dut (.clock, .reset, .packet_valid, .data, .dest_q, .fifo_full, .suspend_data,
                  .we, .hdr_ld, .pay_ld, .par_ld);

  initial begin
    repeat (200000) @(posedge clock);
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

  // present one byte until it is accepted; kind 0 header, 1 payload, 2 parity
  task automatic send(input logic [7:0] b, input int kind, input logic [1:0] d);
    bit done;
    done = 0;
    packet_valid = 1'b1;
    data = b;
    while (!done) begin
      fifo_full = 3'($urandom) & 3'($urandom);
      #1;
      chk(suspend_data == (d != 2'd3 && fifo_full[d]), "suspend_data");
      if (suspend_data) begin
        suspends++;
        chk(we == '0 && !hdr_ld && !pay_ld && !par_ld, "activity while suspended");
      end else begin
        chk(we == ((d == 2'd3) ? 3'b000 : 3'(1 << d)), $sformatf("we=%b dest=%0d", we, d));
        chk(hdr_ld == (kind == 0) && pay_ld == (kind == 1) && par_ld == (kind == 2), "strobes");
        done = 1;
      end
      @(posedge clock);
      if (done && kind == 0) dest_q = b[1:0];
      @(negedge clock);
    end
    packet_valid = 1'b0;
    data = 8'($urandom);
  endtask

  initial begin
    packet_valid = 1'b0; data = '0; dest_q = '0; fifo_full = '0;
    repeat (3) @(posedge clock);
    @(negedge clock);
    reset = 1'b0;
    for (int p = 0; p < 400; p++) begin
      logic [7:0] h;
      h = {6'($urandom_range(p % 5 == 0 ? 0 : 20)), 2'($urandom)};
      if (h[1:0] == 2'd3) drops++;
      send(h, 0, h[1:0]);
      for (int i = 0; i < h[7:2]; i++) send(8'($urandom), 1, h[1:0]);
      send(8'($urandom), 2, h[1:0]);
      // idle gap: nothing may be written
      repeat ($urandom_range(2)) begin
        #1;
        chk(we == '0 && !hdr_ld, "write while idle");
        @(negedge clock);
      end
    end
    chk(suspends > 0 && drops > 0, "suspend or drop never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

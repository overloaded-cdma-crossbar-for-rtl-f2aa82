// tb_router_fifo - random write/read test of the store-and-forward router
// output FIFO.
//
// Writes, with a random "last" tag, and reads are issued at random, never
// writing while full (the router never does). A queue of {last, byte} in
// the testbench and a count of the complete packets in it are the
// reference: vld_out must equal "a complete packet is stored", full must
// equal "queue holds DEPTH bytes", and data_out must show the oldest byte
// whenever vld_out is high. Phases biased to writing and to reading make
// the FIFO fill and empty completely; cycles in which bytes are stored but
// held back because their packet is incomplete are counted and must occur.
module tb_router_fifo;
  localparam int unsigned DEPTH = 128;
  logic clock = 1'b0, reset = 1'b1;
  logic we, re, vld, full, last;
  logic [7:0] din, dout;
  int checks = 0, failures = 0, fills = 0, empties = 0, holds = 0, pk = 0;
  logic [8:0] q [$];

  always #5 clock = ~clock;

  router_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clock, .reset, .we, .din, .last, .read_enb(re),
    .data_out(dout), .vld_out(vld), .full);

  initial begin
    repeat (100000) @(posedge clock);
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
    we = 1'b0; re = 1'b0; din = '0; last = 1'b0;
    repeat (3) @(posedge clock);
    @(negedge clock);
    reset = 1'b0;
    for (int t = 0; t < 20000; t++) begin
      int pw;
      pw = ((t / 1000) % 2 == 0) ? 80 : 20;
      chk(vld == (pk != 0), "vld_out");
      chk(full == (q.size() == DEPTH), "full");
      if (pk != 0) chk(dout == q[0][7:0], $sformatf("data_out %0h want %0h", dout, q[0][7:0]));
      if (q.size() == DEPTH) fills++;
      if (q.size() == 0) empties++;
      if (q.size() != 0 && pk == 0) holds++;
      we   = (q.size() < DEPTH) && ($urandom_range(99) < pw);
      last = ($urandom_range(9) == 0) || (q.size() == DEPTH - 1);
      re   = ($urandom_range(99) >= pw);
      din  = 8'($urandom);
      @(posedge clock);
      if (re && pk != 0) begin
        if (q[0][8]) pk--;
        void'(q.pop_front());
      end
      if (we) begin
        q.push_back({last, din});
        if (last) pk++;
      end
      @(negedge clock);
    end
    chk(fills > 0 && empties > 0, "FIFO never filled or never emptied");
    chk(holds > 0, "no incomplete packet was ever held back");
    $display("fills=%0d empties=%0d holds=%0d", fills, empties, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_router_reg - checks header latching and parity checking of router_reg.
//
// Random packets are fed through the load strobes the controller would
// give: header, payload bytes with random idle cycles in between, then the
// parity byte, which is correct or deliberately wrong at random. After each
// packet err must equal "parity byte was wrong", header must hold the
// header byte, and err must clear when the next header is loaded.
module tb_router_reg;
  logic clock = 1'b0, reset = 1'b1;
  logic [7:0] data, header;
  logic hdr_ld, pay_ld, par_ld, err;
  int checks = 0, failures = 0, bad = 0;

  always #5 clock = ~clock;

  router_reg dut (.clock, .reset, .data, .hdr_ld, .pay_ld, .par_ld, .header, .err);

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

  task automatic put(input logic [7:0] b, input int kind);
    data = b;
    hdr_ld = (kind == 0); pay_ld = (kind == 1); par_ld = (kind == 2);
    @(negedge clock);
    hdr_ld = 1'b0; pay_ld = 1'b0; par_ld = 1'b0;
    data = 8'($urandom);              // idle cycles carry junk
    repeat ($urandom_range(2)) @(negedge clock);
  endtask

  initial begin
    data = '0; hdr_ld = 1'b0; pay_ld = 1'b0; par_ld = 1'b0;
    repeat (3) @(posedge clock);
    @(negedge clock);
    reset = 1'b0;
    for (int p = 0; p < 500; p++) begin
      logic [7:0] h, par;
      bit wrong;
      h = 8'($urandom);
      par = h;
      put(h, 0);
      chk(err == 1'b0, "err not cleared by header");
      chk(header == h, "header not latched");
      for (int i = 0; i < h[7:2]; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        par ^= b;
        put(b, 1);
      end
      wrong = ($urandom_range(3) == 0);
      if (wrong) bad++;
      put(wrong ? par ^ (8'h1 << $urandom_range(7)) : par, 2);
      chk(err == wrong, $sformatf("packet %0d err=%0d want %0d", p, err, wrong));
      chk(header == h, "header lost");
    end
    chk(bad > 0, "no corrupted packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// router_reg - header, parity and status registers of the 1x3 packet router.
//
// A packet is a header byte (destination port in bits [1:0], payload length
// in bytes in bits [7:2]), that many payload bytes, and a parity byte, the
// frame check sequence, equal to the XOR of the header and all payload
// bytes. This register block latches the header when the controller
// accepts it, folds every accepted header and payload byte into a running
// parity, and when the parity byte arrives compares it with the running
// value. err goes high on a mismatch and stays high until the next header is
// accepted. The document names the header/data/frame-check sections and
// says that status, data and parity are kept in this block; the field
// layout, the XOR check and the sticky err are this design's choices.
//
// Timing: all loads happen on the rising clock edge of the cycle in which
// the controller asserts the matching load strobe; err is valid the cycle
// after par_ld.
module router_reg (
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] data,
  input  logic       hdr_ld,    // header byte accepted
  input  logic       pay_ld,    // payload byte accepted
  input  logic       par_ld,    // parity byte accepted
  output logic [7:0] header,
  output logic       err
);

  logic [7:0] run_parity;

  always_ff @(posedge clock) begin
    if (reset) begin
      header     <= '0;
      run_parity <= '0;
      err        <= 1'b0;
    end else begin
      if (hdr_ld) begin
        header     <= data;
        run_parity <= data;
        err        <= 1'b0;
      end
      if (pay_ld) run_parity <= run_parity ^ data;
      if (par_ld) begin
        err        <= (data != run_parity);
      end
    end
  end

endmodule

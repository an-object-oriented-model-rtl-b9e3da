// shift_register: the link adaptor's serial-to-parallel data register.
//
// It holds the last data byte received on LinkIn and drives it on the output
// bus Q0-Q7.  Like the register object of the design's data path model, it
// keeps a one-bit "shift" flag besides the data bits: a clock cycle in which
// the controller raises shift_enable sets the flag, and in every cycle in
// which the flag is set the register moves its bits one place up
// (bit[i] <= bit[i-1]) and takes the LinkIn level into bit 0.  The flag makes
// the register sample LinkIn one bit period after the enable, so the eight
// enables the controller gives from the second start bit onwards capture
// exactly the eight data bits.  The first data bit on the link therefore ends
// in the top bit, Q7, and the last in Q0.
//
// Interface: clk, rst (synchronous, active high, clears bits and flag),
// shift_enable, link_in; q is the register contents.
// Timing: q changes one clock edge after the cycle whose shift flag is set,
// i.e. two edges after the shift_enable that ordered the shift.
//
// The width and the shift direction follow the register object; the
// one-cycle shift flag and the reset are this design's own choices.
module shift_register #(
  parameter int unsigned DATA_W = tla_pkg::TLA_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              shift_enable,
  input  logic              link_in,
  output logic [DATA_W-1:0] q
);

  logic shift_q;  // the register object's "shift" flag

  always_ff @(posedge clk) begin
    if (rst) begin
      shift_q <= 1'b0;
      q       <= '0;
    end else begin
      shift_q <= shift_enable;
      if (shift_q) q <= {q[DATA_W-2:0], link_in};
    end
  end

endmodule

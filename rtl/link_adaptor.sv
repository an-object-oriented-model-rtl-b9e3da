// link_adaptor: a transputer link adaptor, a full-duplex bridge between one
// serial transputer link (LinkIn, LinkOut) and two unidirectional 8-bit buses
// with handshakes: the input bus I0-I7 with IValid/IAck and the output bus
// Q0-Q7 with QValid/QAck.
//
// It consists of the Petri-net controller and the shift register.  The
// controller watches LinkIn, multiplexes the bytes of the input bus onto
// LinkOut, sends and detects acknowledgment packets and runs both bus
// handshakes; the shift register, enabled by the controller, collects the
// data bits of LinkIn and holds the byte on Q0-Q7.
//
// Link format, one bit per clock cycle, idle low: a data packet is 1, 1,
// eight data bits (Q7/I7 first), 0; an acknowledgment packet is 1, 0.
// Bus handshakes: the bus driver puts a byte on I0-I7 and raises IValid; the
// adaptor sends it and, when the acknowledgment arrives on LinkIn, pulses IAck
// for one cycle; the driver then lowers IValid.  For received data, the
// adaptor pulses QValid for one cycle with the byte on Q0-Q7; the receiver
// raises QAck, the adaptor answers with an acknowledgment packet on LinkOut,
// and waits for QAck to fall.
// Interface: synchronous active-high rst; fire and status are observation
// outputs of the controller.
//
// The block structure follows the design; the one-bit-per-clock timing, the
// bit order and the observation outputs are this design's own choices.
module link_adaptor #(
  parameter int unsigned DATA_W = tla_pkg::TLA_DATA_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 link_in,
  output logic                 link_out,
  input  logic [DATA_W-1:0]    i_data,
  input  logic                 ivalid,
  output logic                 iack,
  output logic [DATA_W-1:0]    q_data,
  output logic                 qvalid,
  input  logic                 qack,
  output tla_pkg::tla_fire_t   fire,
  output tla_pkg::tla_status_t status
);

  logic shift_enable;

  controller #(.DATA_W(DATA_W)) u_controller (
    .clk          (clk),
    .rst          (rst),
    .link_in      (link_in),
    .i_data       (i_data),
    .ivalid       (ivalid),
    .qack         (qack),
    .link_out     (link_out),
    .iack         (iack),
    .qvalid       (qvalid),
    .shift_enable (shift_enable),
    .fire         (fire),
    .status       (status)
  );

  shift_register #(.DATA_W(DATA_W)) u_shift_register (
    .clk          (clk),
    .rst          (rst),
    .shift_enable (shift_enable),
    .link_in      (link_in),
    .q            (q_data)
  );

endmodule

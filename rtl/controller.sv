// controller: the link adaptor's control unit, a synchronous interpreted
// Petri net with two macroplaces.
//
// Every place is one flip-flop that holds its token; a transition is a
// combinational AND of its input places and its input condition, and fires
// for the one clock cycle in which it is enabled.  A place's next marking is
// "some input transition fires, or it is marked and none of its output
// transitions fires".  The outputs are Mealy outputs: each is high exactly in
// the cycles in which the transitions that drive it fire, except IAck and
// QValid, which are held from their transition until the other side answers.
//
// The net runs four concurrent loops that share tokens:
//   LinkIn  (token p1 -> p2): t1 sees the first start bit; in p2 a second
//           high bit (t2) starts SerPar, a low bit while p28 is marked (t10)
//           is an acknowledgment for the byte last sent, relayed as IAck.
//   Q bus   (token p29): t3 moves a received byte to the bus, t4 raises
//           QValid, t5 waits for QAck and sends the acknowledgment start bit,
//           t6 sends its stop bit, t7 waits for QAck low.
//   I bus   (token p12): t8 waits for IValid and sends the first start bit,
//           ParSer sends the rest, t9 sends the stop bit and marks p28, the
//           wait for the acknowledgment; t10 relays it, t11 waits for IValid
//           low.
//   LinkOut (token p17): a mutual-exclusion token; t5 and t8 compete for it,
//           t6 and t9 give it back.
// Initial marking (synchronous reset): p1, p12, p17, p29.
//
// Interface: link_in, i_data (I0-I7), ivalid, qack in; link_out, iack,
// qvalid, shift_enable out; fire = firing pulse of each main-net transition;
// status = SerPar/ParSer activity and the two wait conditions.
// Timing, one bit period per clock: for a data packet whose first start bit
// is on link_in in cycle 0, shift_enable is high in cycles 1..8 and, if the Q
// bus is free, qvalid rises in cycle 10 and stays high up to and including
// the cycle in which QAck is seen and t5 fires.  iack rises on the low bit of
// an acknowledgment packet and stays high up to the cycle in which IValid is
// seen low.  IValid sampled high in cycle 0
// puts the packet's first start bit on link_out in cycle 0 and its stop bit
// in cycle 10.
//
// The places, transitions, conditions and output equations follow the
// design's net, including t1 being disabled while p2 is marked.  The held
// IAck and QValid follow the described bus handshake rather than a
// transition-only output.  This design also adds one rule: when t5 and t8 are enabled together, t5 (the acknowledgment,
// which is two bits long) takes LinkOut and t8 waits; the net itself only
// flags that conflict.  The assertions report the unsafe situations named for
// this net.
module controller #(
  parameter int unsigned DATA_W = tla_pkg::TLA_DATA_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 link_in,
  input  logic [DATA_W-1:0]    i_data,
  input  logic                 ivalid,
  input  logic                 qack,
  output logic                 link_out,
  output logic                 iack,
  output logic                 qvalid,
  output logic                 shift_enable,
  output tla_pkg::tla_fire_t   fire,
  output tla_pkg::tla_status_t status
);

  // Main-net places.
  logic p1, p2, p11, p12, p13, p14, p15, p16, p17, p28, p29;
  // Main-net transitions.
  logic t1, t2, t3, t4, t5, t6, t7, t8, t9, t10, t11;
  logic t8_enabled;

  // Macroplaces.
  logic serpar_done, serpar_busy, serpar_shift;
  logic parser_done, parser_busy, parser_link_out;

  serpar #(.DATA_W(DATA_W)) u_serpar (
    .clk        (clk),
    .rst        (rst),
    .start      (t2),
    .consume    (t3),
    .done       (serpar_done),
    .busy       (serpar_busy),
    .shift_fire (serpar_shift)
  );

  parser #(.DATA_W(DATA_W)) u_parser (
    .clk      (clk),
    .rst      (rst),
    .start    (t8),
    .consume  (t9),
    .data     (i_data),
    .link_out (parser_link_out),
    .done     (parser_done),
    .busy     (parser_busy)
  );

  // Transitions.
  always_comb begin
    t1  = p1 & link_in & ~p2;
    t2  = p2 & link_in;
    t10 = p2 & p28 & ~link_in;
    t11 = p11 & ~ivalid;
    t3  = serpar_done & p29;
    t4  = p13;
    t5  = p14 & p17 & qack;
    t6  = p15;
    t7  = p16 & ~qack;
    t8_enabled = p12 & p17 & ivalid;
    t8  = t8_enabled & ~t5;
    t9  = parser_done;
  end

  // Next markings.
  always_ff @(posedge clk) begin
    if (rst) begin
      p1  <= 1'b1;
      p2  <= 1'b0;
      p11 <= 1'b0;
      p12 <= 1'b1;
      p13 <= 1'b0;
      p14 <= 1'b0;
      p15 <= 1'b0;
      p16 <= 1'b0;
      p17 <= 1'b1;
      p28 <= 1'b0;
      p29 <= 1'b1;
    end else begin
      p1  <= t10 | t3 | (p1 & ~t1);
      p2  <= t1 | (p2 & ~t2 & ~t10);
      p11 <= t10 | (p11 & ~t11);
      p12 <= t11 | (p12 & ~t8);
      p13 <= t3 | (p13 & ~t4);
      p14 <= t4 | (p14 & ~t5);
      p15 <= t5 | (p15 & ~t6);
      p16 <= t6 | (p16 & ~t7);
      p17 <= t6 | t9 | (p17 & ~t5 & ~t8);
      p28 <= t9 | (p28 & ~t10);
      p29 <= t7 | (p29 & ~t3);
    end
  end

  // Outputs.  LinkOut and Shift_Enable are pure transition outputs.  IAck
  // and QValid are raised by their transitions (t10, t4) and held while the
  // following place waits for the other side (p11, p14), which gives both
  // buses a complete four-phase handshake.
  assign link_out     = t5 | t8 | parser_link_out;
  assign iack         = t10 | p11;
  assign qvalid       = t4 | p14;
  assign shift_enable = t2 | serpar_shift;

  assign fire = '{t11: t11, t10: t10, t9: t9, t8: t8, t7: t7, t6: t6,
                  t5: t5, t4: t4, t3: t3, t2: t2, t1: t1};
  assign status = '{rx_busy:     serpar_busy,
                    tx_busy:     parser_busy,
                    rx_held:     serpar_done & ~p29,
                    tx_deferred: t8_enabled & t5};

  // Places p1 and p17 must stay safe, and p17 must not be taken twice.
  a_p1_safe : assert property (@(posedge clk) disable iff (rst) !(t10 && t3))
    else $error("output place p1 overflows (transitions t10,t3)");
  a_p17_safe : assert property (@(posedge clk) disable iff (rst) !(t6 && t9))
    else $error("output place p17 overflows (transitions t6,t9)");
  a_p17_conflict : assert property (@(posedge clk) disable iff (rst) !(t5 && t8))
    else $error("input place p17 in conflict (transitions t5,t8)");

endmodule

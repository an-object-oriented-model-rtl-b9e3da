// tla_pkg: types and constants shared by the transputer link adaptor.
//
// The adaptor's controller is a synchronous Petri net.  Every main-net
// transition (t1..t11) fires for exactly one clock cycle; the record
// tla_fire_t collects those firing pulses so that the top level can bring
// them out as an observation port and a testbench can see which part of the
// net has run; tla_status_t does the same for the sub-nets and the two wait
// conditions.  The bus width of eight bits is the one the link adaptor has
// (I0-I7 and Q0-Q7).
package tla_pkg;

  // Width of the input bus I0-I7 and the output bus Q0-Q7.
  localparam int unsigned TLA_DATA_W = 8;

  // Firing pulses of the main-net transitions t1..t11.
  typedef struct packed {
    logic t11;  // p11 -> p12       : IValid low, input bus released
    logic t10;  // p2 + p28 -> p1 + p11 : acknowledgment packet received, IAck
    logic t9;   // ParSer -> p28 + p17 : data packet sent, LinkOut released
    logic t8;   // p12 + p17 -> ParSer : IValid high, first start bit sent
    logic t7;   // p16 -> p29       : QAck low, output bus released
    logic t6;   // p15 -> p16 + p17 : acknowledgment stop bit, LinkOut released
    logic t5;   // p14 + p17 -> p15 : QAck high, acknowledgment start bit sent
    logic t4;   // p13 -> p14       : QValid
    logic t3;   // SerPar + p29 -> p1 + p13 : byte received, Q bus taken
    logic t2;   // p2 -> SerPar     : second start bit, data packet detected
    logic t1;   // p1 -> p2         : first start bit detected
  } tla_fire_t;

  // Status of the controller's marking, for observation.
  typedef struct packed {
    logic rx_busy;     // a token is inside SerPar (data bits being received)
    logic tx_busy;     // a token is inside ParSer (data bits being sent)
    logic rx_held;     // SerPar finished but p29 is empty: t3 waits for the Q bus
    logic tx_deferred; // t8 was enabled but lost LinkOut to t5 this cycle
  } tla_status_t;

endpackage

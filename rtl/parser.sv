// parser: the ParSer macroplace of the link adaptor controller, the sub-net
// that sends the body of an outgoing data packet on LinkOut.
//
// The main-net transition t8 sends the first start bit and marks the first
// place of this sub-net.  The sub-net is a chain of DATA_W+2 places (p18 ..
// p27 for eight bits):
//   place 0          its transition sends the second start bit (LinkOut high);
//   places 1..DATA_W each has two transitions, one conditioned on the input
//                    bus bit I<n> that raises LinkOut and one on NOT I<n> that
//                    leaves it low, so the bus bit is multiplexed onto the link;
//   last place       waits for t9, which sends the stop bit (LinkOut low) and
//                    releases the link.
// Data bits go out from I7 down to I0, matching the shift register, which puts
// the first data bit it receives into Q7.  An internal transition is enabled
// when its input place is marked and its output place is empty, so the token
// moves one place, and one bit goes out, per clock.  The bus driver keeps
// I0-I7 stable while IValid is high, so the data bits are read straight from
// the bus and need no holding register.
//
// Interface: start = t8 firing, consume = t9 firing, data = I0-I7,
// link_out = LinkOut contribution of the internal transitions (the
// controller ORs it with its own LinkOut terms), done = last place marked,
// busy = any place marked.
// Timing: with start in cycle c, link_out carries the second start bit in
// cycle c+1, data bit I7 in cycle c+2, ..., I0 in cycle c+DATA_W+1; done is high
// from cycle c+DATA_W+2 on.
//
// The sub-net's internals are not printed with the design; their shape here
// (one place per bit, two transitions per data bit) is this design's own
// reconstruction, chosen to agree with the stated total of places and
// transitions of the controller.  The bit order is this design's own choice.
module parser #(
  parameter int unsigned DATA_W = tla_pkg::TLA_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              consume,
  input  logic [DATA_W-1:0] data,
  output logic              link_out,
  output logic              done,
  output logic              busy
);

  localparam int unsigned NP = DATA_W + 2;

  logic [NP-1:0] p;      // p[0] is the first place, p[NP-1] the last
  logic [NP-1:0] adv;    // the place's token moves on this cycle (k < NP-1)
  logic [NP-1:0] hi;     // transition that raises LinkOut fires

  always_comb begin
    adv = '0;
    hi  = '0;
    for (int k = 0; k < NP - 1; k++) adv[k] = p[k] & ~p[k+1];
    hi[0] = adv[0];                                   // second start bit
    for (int k = 1; k <= DATA_W; k++) hi[k] = adv[k] & data[DATA_W-k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p <= '0;
    end else begin
      p[0] <= start | (p[0] & ~adv[0]);
      for (int k = 1; k < NP - 1; k++) p[k] <= adv[k-1] | (p[k] & ~adv[k]);
      p[NP-1] <= adv[NP-2] | (p[NP-1] & ~consume);
    end
  end

  assign link_out = |hi;
  assign done     = p[NP-1];
  assign busy     = |p;

  a_entry_safe : assert property (@(posedge clk) disable iff (rst) !(start && p[0]))
    else $error("parser: first place overflows");
  a_consume_marked : assert property (@(posedge clk) disable iff (rst) !(consume && !done))
    else $error("parser: t9 fires with the last place empty");

endmodule

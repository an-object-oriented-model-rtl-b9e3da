// serpar: the SerPar macroplace of the link adaptor controller, the sub-net
// that times the reception of the data bits of an incoming data packet.
//
// It is a chain of DATA_W places (serpar_p3 .. serpar_p10 for eight bits).
// The main-net transition t2, which fires on the second start bit, marks the
// first place.  Each internal transition serpar_st<k> moves the token one place
// on; it is enabled when its input place is marked and its output place is
// empty, and it carries no input condition, so the token advances one place
// per clock.  Every firing of t2 or of an internal transition raises the
// register's Shift_Enable; the controller ORs shift_fire with t2 for this.
// When the token reaches the last place, done is high until the main-net
// transition t3 takes the token out (consume).
//
// Interface: start = t2 firing, consume = t3 firing, done = last place marked,
// busy = any place marked, shift_fire = an internal transition fires.
// Timing: with start in cycle c, shift_fire is high in cycles c+1 .. c+DATA_W-1
// and done from cycle c+DATA_W on.
//
// The place chain, the enabling rule of the internal transitions and the
// shift enable equation follow the printed controller equations; a general
// DATA_W is this design's own parameter.
module serpar #(
  parameter int unsigned DATA_W = tla_pkg::TLA_DATA_W
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic consume,
  output logic done,
  output logic busy,
  output logic shift_fire
);

  logic [DATA_W-1:0] p;   // p[0] is serpar_p3, p[DATA_W-1] the last place
  logic [DATA_W-1:0] st;  // st[k] moves p[k-1] to p[k]; st[0] is unused

  always_comb begin
    st = '0;
    for (int k = 1; k < DATA_W; k++) st[k] = p[k-1] & ~p[k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p <= '0;
    end else begin
      p[0] <= start | (p[0] & ~st[1]);
      for (int k = 1; k < DATA_W - 1; k++) p[k] <= st[k] | (p[k] & ~st[k+1]);
      p[DATA_W-1] <= st[DATA_W-1] | (p[DATA_W-1] & ~consume);
    end
  end

  assign done       = p[DATA_W-1];
  assign busy       = |p;
  assign shift_fire = |st;

  // Safeness: the entry place must be empty when t2 marks it, and t3 may
  // only take a token that is there.
  a_entry_safe : assert property (@(posedge clk) disable iff (rst) !(start && p[0]))
    else $error("serpar: place serpar_p3 overflows");
  a_consume_marked : assert property (@(posedge clk) disable iff (rst) !(consume && !done))
    else $error("serpar: t3 fires with the last place empty");

endmodule

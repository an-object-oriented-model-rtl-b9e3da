// tb_link_adaptor: end-to-end test of the link adaptor at its default size.
//
// Around the adaptor sit three models, all synchronous to the clock:
//   transputer  on the serial link.  It sends data packets on LinkIn, one at
//               a time, each only after the acknowledgment of the previous
//               one has come back on LinkOut; it decodes LinkOut, checks the
//               framing of every packet, and answers every data packet it
//               receives with an acknowledgment packet (acknowledgments go
//               before data on its own output).
//   bus driver  on I0-I7/IValid/IAck (four-phase: IValid up, wait IAck, IValid
//               down, wait IAck down).
//   bus reader  on Q0-Q7/QValid/QAck (four-phase: wait QValid, take the byte,
//               QAck up, wait QValid down, QAck down).
// Bytes must arrive complete and in order in both directions.  The latency
// from the first start bit on LinkIn to QValid must be ten cycles whenever
// the Q bus is free, and every data packet the adaptor sends must start in
// the cycle in which the adaptor accepts IValid (t8) and last eleven cycles.
// The test runs in three phases:
//   1  both directions at once with short random handshake delays;
//   2  receive only, with QAck held long, so a received byte waits in SerPar
//      for the Q bus;
//   3  QAck and IValid raised in the same cycle, so the acknowledgment and a
//      data packet compete for LinkOut.
// It counts how often each mechanism happened and fails if one never did.
module tb_link_adaptor;
  import tla_pkg::*;
  localparam int unsigned W = TLA_DATA_W;
  localparam int N1 = 300;   // bytes each way in phase 1
  localparam int N2 = 40;    // bytes received in phase 2
  localparam int N3 = 40;    // conflicts in phase 3

  logic clk = 1'b0;
  logic rst;
  logic link_in, link_out;
  logic [W-1:0] i_data, q_data;
  logic ivalid, iack, qvalid, qack;
  tla_fire_t fire;
  tla_status_t status;
  int checks = 0, failures = 0;

  link_adaptor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: phase %0d t_sent %0d bus_got %0d bus_sent %0d t_got %0d ds %0d qs %0d wait_ack %0d owed %0d",
             phase, t_sent, bus_got, bus_sent, t_got, ds, qs, t_wait_ack, acks_owed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  int cyc = 0;
  int phase = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Expected byte streams.
  logic [W-1:0] to_bus_q[$];    // sent by the transputer, expected on Q
  logic [W-1:0] to_link_q[$];   // sent by the bus driver, expected on LinkOut
  int t_sent = 0, t_got = 0, bus_sent = 0, bus_got = 0;
  int t_bytes_to_send = 0;      // budget for the transputer, set per phase
  int bus_bytes_to_send = 0;    // budget for the bus driver, set per phase

  // Mechanism counters.
  int n_held = 0, n_deferred = 0, n_duplex = 0, n_ack_in = 0, n_ack_out = 0;
  bit held_now = 0;
  always @(posedge clk) if (!rst) begin
    if (status.rx_held && !held_now) n_held++;
    held_now <= status.rx_held;
    if (status.tx_deferred) n_deferred++;
    if (status.rx_busy && status.tx_busy) n_duplex++;
    if (fire.t10) n_ack_in++;
    if (fire.t5) n_ack_out++;
  end

  // ------------------------------------------------------------------ //
  // Transputer model
  // ------------------------------------------------------------------ //
  int  ser_left = 0;            // bits still to send of the current packet
  logic [W+2:0] ser_bits;       // current packet, next bit on top
  int  acks_owed = 0;           // acknowledgments the transputer must send
  bit  t_wait_ack = 0;          // a data packet is waiting for its ack
  int  t_gap = 0;
  int  last_start = 0;          // cycle of the first start bit of the last data packet
  bit  held_since_start = 0;

  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DATA, R_STOP} rstate_t;
  rstate_t rs = R_IDLE;
  int rcnt = 0;
  logic [W-1:0] rbyte;
  int pkt_first = 0;            // cycle of the first start bit seen on LinkOut

  always @(posedge clk) begin
    if (rst) begin
      link_in <= 1'b0;
    end else begin
      // decode LinkOut (the value of the cycle that just ended)
      case (rs)
        R_IDLE: if (link_out) begin rs = R_HDR; pkt_first = cyc; end
        R_HDR:  if (link_out) begin rs = R_DATA; rcnt = 0; end
                else begin
                  chk("acknowledgment with nothing outstanding", t_wait_ack);
                  t_wait_ack = 0;
                  rs = R_IDLE;
                end
        R_DATA: begin
                  rbyte = {rbyte[W-2:0], link_out};
                  rcnt++;
                  if (rcnt == W) rs = R_STOP;
                end
        R_STOP: begin
                  chk("stop bit low", !link_out);
                  chk("data packet from the bus driver", to_link_q.size() > 0);
                  if (to_link_q.size() > 0) chk($sformatf("byte on link %h", rbyte),
                                                rbyte == to_link_q.pop_front());
                  t_got++;
                  acks_owed++;
                  rs = R_IDLE;
                end
      endcase
      if (status.rx_held) held_since_start = 1;
      // serializer for LinkIn
      if (ser_left > 0) begin
        link_in  <= ser_bits[W+2];
        ser_bits = ser_bits << 1;
        ser_left--;
      end else if (acks_owed > 0) begin
        ser_bits = {2'b10, {(W+1){1'b0}}};
        link_in  <= 1'b1;
        ser_bits = ser_bits << 1;
        ser_left = 1;
        acks_owed--;
      end else if (!t_wait_ack && t_sent < t_bytes_to_send && t_gap == 0 &&
                   (phase != 3 || (ds == D_IDLE && t_got == bus_sent))) begin
        logic [W-1:0] b;
        b = W'($urandom);
        to_bus_q.push_back(b);
        ser_bits = {2'b11, b, 1'b0};
        link_in  <= 1'b1;
        ser_bits = ser_bits << 1;
        ser_left = W + 2;
        t_wait_ack = 1;
        t_sent++;
        last_start = cyc;
        held_since_start = 0;
        t_gap = (phase == 1) ? $urandom_range(0, 6) : 0;
      end else begin
        link_in <= 1'b0;
        if (t_gap > 0) t_gap--;
      end
    end
  end

  // Every data packet the adaptor sends starts in its t8 cycle.
  int t8_cycle = -100;
  always @(posedge clk) if (!rst && fire.t8) t8_cycle <= cyc;
  always @(posedge clk) if (!rst && rs == R_IDLE && link_out) begin
    // link_out high from idle: either an ack (t5) or a data packet (t8)
    chk("packet start is t5 or t8", fire.t5 || fire.t8);
  end

  // ------------------------------------------------------------------ //
  // Bus driver (I side)
  // ------------------------------------------------------------------ //
  typedef enum logic [1:0] {D_IDLE, D_WAIT_ACK, D_WAIT_DROP} dstate_t;
  dstate_t ds = D_IDLE;
  int ddelay = 0;
  // Phase 3: the bus reader raises QAck at the second edge that sees QValid
  // high; the driver raises IValid at that same edge.
  bit qv_prev = 0, qv_prev2 = 0, conflict_go;
  always @(posedge clk) begin
    conflict_go = qvalid && qv_prev && !qv_prev2;
    qv_prev2 = qv_prev;
    qv_prev = qvalid;
    if (rst) begin
      ivalid <= 1'b0; i_data <= '0;
    end else begin
      case (ds)
        D_IDLE:
          if (ddelay > 0) ddelay--;
          else if (bus_sent < bus_bytes_to_send && (phase != 3 || conflict_go)) begin
            logic [W-1:0] b;
            b = W'($urandom);
            i_data <= b;
            ivalid <= 1'b1;
            to_link_q.push_back(b);
            bus_sent++;
            ds = D_WAIT_ACK;
          end
        D_WAIT_ACK:
          if (iack) begin
            if (ddelay == 0) ddelay = (phase == 1) ? $urandom_range(0, 2) : 0;
            if (ddelay == 1 || (phase != 1)) begin ivalid <= 1'b0; ds = D_WAIT_DROP; ddelay = 0; end
            else if (ddelay > 1) ddelay--;
            else begin ivalid <= 1'b0; ds = D_WAIT_DROP; end
          end
        D_WAIT_DROP:
          if (!iack) begin
            ds = D_IDLE;
            ddelay = (phase == 1) ? $urandom_range(0, 8) : 0;
          end
        default: ds = D_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------ //
  // Bus reader (Q side)
  // ------------------------------------------------------------------ //
  typedef enum logic [1:0] {Q_IDLE, Q_DELAY, Q_WAIT_DROP, Q_HOLD} qstate_t;
  qstate_t qs = Q_IDLE;
  int qdelay = 0;
  always @(posedge clk) begin
    if (rst) begin
      qack <= 1'b0;
    end else begin
      case (qs)
        Q_IDLE:
          if (qvalid) begin
            chk("received byte expected", to_bus_q.size() > 0);
            if (to_bus_q.size() > 0) chk($sformatf("byte on Q %h", q_data),
                                         q_data == to_bus_q.pop_front());
            if (!held_since_start)
              // both cycle numbers are read at a clock edge: the start bit is
              // driven after edge last_start, QValid is seen at the edge that
              // ends its first cycle, so ten bit periods read as 11
              chk($sformatf("QValid latency %0d", cyc - last_start), cyc - last_start == 11);
            bus_got++;
            qdelay = (phase == 1) ? $urandom_range(0, 3) : 0;
            qs = Q_DELAY;
          end
        Q_DELAY:
          if (qdelay > 0) qdelay--;
          else begin
            qack <= 1'b1;
            qs = Q_WAIT_DROP;
          end
        Q_WAIT_DROP:
          if (!qvalid) begin
            qdelay = (phase == 1) ? $urandom_range(0, 2) : (phase == 2) ? $urandom_range(15, 30) : 0;
            qs = Q_HOLD;
          end
        Q_HOLD:
          if (qdelay > 0) qdelay--;
          else begin qack <= 1'b0; qs = Q_IDLE; end
      endcase
    end
  end

  task automatic wait_quiet();
    // wait until every byte has been delivered and both buses are idle
    while (!(t_sent == t_bytes_to_send && bus_sent == bus_bytes_to_send &&
             t_sent == bus_got && bus_sent == t_got && ds == D_IDLE && qs == Q_IDLE &&
             !t_wait_ack && acks_owed == 0 && ser_left == 0 && !ivalid && !qack))
      @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  initial begin
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);

    phase = 1;
    t_bytes_to_send = N1; bus_bytes_to_send = N1;
    wait_quiet();
    chk("phase 1 all bytes", t_got == N1 && bus_got == N1);

    phase = 2;
    t_bytes_to_send = N1 + N2;
    wait_quiet();
    chk("phase 2 all bytes", bus_got == N1 + N2);

    phase = 3;
    t_bytes_to_send = N1 + N2 + N3; bus_bytes_to_send = N1 + N3;
    wait_quiet();
    chk("phase 3 all bytes", bus_got == N1 + N2 + N3 && t_got == N1 + N3);

    $display("bytes link->Q %0d, I->link %0d; acks in %0d, acks out %0d", bus_got, t_got,
             n_ack_in, n_ack_out);
    $display("mechanisms: byte held in SerPar %0d, t8 deferred by t5 %0d, full-duplex cycles %0d",
             n_held, n_deferred, n_duplex);
    chk("acknowledgments received", n_ack_in == t_got);
    chk("acknowledgments sent", n_ack_out == bus_got);
    chk("byte held in SerPar happened", n_held > 0);
    chk("LinkOut conflict happened", n_deferred > 0);
    chk("full-duplex overlap happened", n_duplex > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

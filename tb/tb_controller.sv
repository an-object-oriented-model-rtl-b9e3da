// tb_controller: directed, cycle-exact test of the link adaptor controller.
//
// Inputs change just after a rising clock edge and outputs are sampled at the
// falling edge, so each sample shows the transitions that fire in that cycle.
// Scenarios:
//   A  data packet on LinkIn: t1 on the first start bit, t2 and Shift_Enable
//      on the second, Shift_Enable for eight cycles in all, t3 nine cycles and
//      QValid rising ten cycles after the first start bit; QValid stays high
//      until QAck gives the acknowledgment packet 1,0 on LinkOut, and QAck
//      low fires t7.
//   B  IValid: the packet 1,1,I7..I0,0 on LinkOut starting in the same cycle,
//      no second packet while IValid stays high, IAck from the low bit of an
//      acknowledgment packet until IValid falls (t11).
//   C  QAck and IValid in the same cycle: the acknowledgment wins LinkOut,
//      the data packet follows right after its stop bit.
//   D  a second data packet arriving while the Q bus handshake of the first
//      is still open: SerPar holds the byte until QAck falls.
module tb_controller;
  import tla_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst, link_in, ivalid, qack;
  logic [W-1:0] i_data;
  logic link_out, iack, qvalid, shift_enable;
  tla_fire_t fire;
  tla_status_t status;
  int checks = 0, failures = 0;

  controller #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // Move to the sampling point of the current cycle.
  task automatic sample();
    @(negedge clk);
  endtask
  // Move to the driving point of the next cycle.
  task automatic next();
    @(posedge clk); #1;
  endtask

  function automatic logic [W+2:0] data_frame(input logic [W-1:0] b);
    return {2'b11, b, 1'b0};
  endfunction

  // Scenario A/D helper: send a data packet on LinkIn, checking the
  // receive-side firing pattern; t3_at is the expected cycle of t3 (9 when the
  // Q bus is free).
  task automatic rx_packet(input logic [W-1:0] b, input bit q_bus_free);
    logic [W+2:0] f;
    f = data_frame(b);
    for (int k = 0; k <= W + 2; k++) begin
      link_in = f[W+2-k];
      sample();
      chk($sformatf("rx t1 k=%0d", k), fire.t1, k == 0);
      chk($sformatf("rx t2 k=%0d", k), fire.t2, k == 1);
      chk($sformatf("rx shift k=%0d", k), shift_enable, k >= 1 && k <= W);
      chk($sformatf("rx t3 k=%0d", k), fire.t3, q_bus_free && k == W + 1);
      chk($sformatf("rx qvalid k=%0d", k), qvalid, q_bus_free && k == W + 2);
      next();
    end
    link_in = 1'b0;
  endtask

  initial begin
    logic [W+2:0] f;
    logic [W-1:0] b;
    rst = 1'b1; link_in = 1'b0; ivalid = 1'b0; qack = 1'b0; i_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (2) next();

    // ---------------- A: receive, QValid, acknowledgment --------------
    for (int n = 0; n < 4; n++) begin
      rx_packet(W'($urandom), 1'b1);
      repeat ($urandom_range(0, 3)) begin
        sample(); chk("A idle link_out", link_out, 1'b0); chk("A qvalid held", qvalid, 1'b1); next();
      end
      qack = 1'b1;
      sample(); chk("A t5", fire.t5, 1'b1); chk("A ack start bit", link_out, 1'b1);
      chk("A qvalid in t5 cycle", qvalid, 1'b1); next();
      sample(); chk("A t6", fire.t6, 1'b1); chk("A ack stop bit", link_out, 1'b0);
      chk("A qvalid low", qvalid, 1'b0); next();
      sample(); chk("A QAck still high", fire.t7, 1'b0); chk("A quiet", link_out, 1'b0); next();
      qack = 1'b0;
      sample(); chk("A t7", fire.t7, 1'b1); next();
    end

    // ---------------- B: transmit and acknowledgment -----------------
    for (int n = 0; n < 4; n++) begin
      b = W'($urandom);
      f = data_frame(b);
      i_data = b; ivalid = 1'b1;
      for (int k = 0; k <= W + 2; k++) begin
        sample();
        chk($sformatf("B link_out k=%0d", k), link_out, f[W+2-k]);
        chk($sformatf("B t8 k=%0d", k), fire.t8, k == 0);
        chk($sformatf("B t9 k=%0d", k), fire.t9, k == W + 2);
        next();
      end
      // IValid still high: no new packet before the acknowledgment
      repeat (4) begin
        sample(); chk("B no resend", link_out, 1'b0); chk("B no iack", iack, 1'b0); next();
      end
      link_in = 1'b1;
      sample(); chk("B ack t1", fire.t1, 1'b1); chk("B no early iack", iack, 1'b0); next();
      link_in = 1'b0;
      sample(); chk("B iack", iack, 1'b1); chk("B t10", fire.t10, 1'b1);
      chk("B no shift", shift_enable, 1'b0); next();
      repeat ($urandom_range(1, 3)) begin
        sample(); chk("B iack held", iack, 1'b1); chk("B t11 waits", fire.t11, 1'b0); next();
      end
      ivalid = 1'b0;
      sample(); chk("B t11", fire.t11, 1'b1); chk("B iack in t11 cycle", iack, 1'b1); next();
      sample(); chk("B iack low", iack, 1'b0); next();
    end

    // ---------------- C: conflict on LinkOut --------------------------
    rx_packet(8'h5a, 1'b1);
    next();
    b = 8'hc3;
    f = data_frame(b);
    i_data = b; ivalid = 1'b1; qack = 1'b1;
    sample(); chk("C t5 wins", fire.t5, 1'b1); chk("C t8 waits", fire.t8, 1'b0);
    chk("C deferred", status.tx_deferred, 1'b1); chk("C ack start", link_out, 1'b1); next();
    sample(); chk("C ack stop", link_out, 1'b0); chk("C t8 still waits", fire.t8, 1'b0); next();
    for (int k = 0; k <= W + 2; k++) begin
      sample();
      chk($sformatf("C link_out k=%0d", k), link_out, f[W+2-k]);
      chk($sformatf("C t8 k=%0d", k), fire.t8, k == 0);
      if (k == 0) begin qack = 1'b0; end
      next();
    end
    link_in = 1'b1; next(); link_in = 1'b0;
    sample(); chk("C iack", iack, 1'b1); next();
    ivalid = 1'b0; next(); next();

    // ---------------- D: second byte while the Q bus is busy ----------
    rx_packet(8'h11, 1'b1);
    next();
    qack = 1'b1; next(); next(); next();   // acknowledgment sent, QAck held
    rx_packet(8'h22, 1'b0);                // p29 empty: no t3, no QValid
    for (int h = 0; h < 5; h++) begin
      sample(); chk("D held", status.rx_held, 1'b1); chk("D no t3", fire.t3, 1'b0); next();
    end
    qack = 1'b0;
    sample(); chk("D t7", fire.t7, 1'b1); next();
    sample(); chk("D t3 after release", fire.t3, 1'b1); chk("D released", status.rx_held, 1'b0); next();
    sample(); chk("D qvalid", qvalid, 1'b1); next();
    qack = 1'b1;
    sample(); chk("D ack", link_out, 1'b1); next();
    qack = 1'b0; next(); next();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

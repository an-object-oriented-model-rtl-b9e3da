// tb_adaptor_pair: two link adaptors connected link to link, each with its own
// bus driver and bus reader, both directions busy at once.
//
// Adaptor 0's LinkOut is adaptor 1's LinkIn and the other way round, so each
// adaptor's acknowledgments are the other's only source of flow control.  On
// each side a bus driver sends random bytes with the four-phase IValid/IAck
// handshake and a bus reader takes bytes with QValid/QAck, answering within a
// few cycles (a reader that holds QAck far longer can make an adaptor miss an
// acknowledgment, a limit of the controller's net).  Every byte must arrive
// unchanged and in order at the other side's Q bus; the test also checks
// that both adaptors had transmit and receive active in the same cycle, and
// it reports the link throughput reached.
module tb_adaptor_pair;
  import tla_pkg::*;
  localparam int unsigned W = TLA_DATA_W;
  localparam int N = 500;       // bytes per direction

  logic clk = 1'b0;
  logic rst;
  logic wire01, wire10;         // 0 -> 1 and 1 -> 0
  logic [W-1:0] i_data [2];
  logic [W-1:0] q_data [2];
  logic ivalid [2], iack [2], qvalid [2], qack [2];
  tla_fire_t   fire [2];
  tla_status_t status [2];
  int checks = 0, failures = 0;
  int cyc = 0;

  link_adaptor u0 (.clk, .rst, .link_in(wire10), .link_out(wire01),
                   .i_data(i_data[0]), .ivalid(ivalid[0]), .iack(iack[0]),
                   .q_data(q_data[0]), .qvalid(qvalid[0]), .qack(qack[0]),
                   .fire(fire[0]), .status(status[0]));
  link_adaptor u1 (.clk, .rst, .link_in(wire01), .link_out(wire10),
                   .i_data(i_data[1]), .ivalid(ivalid[1]), .iack(iack[1]),
                   .q_data(q_data[1]), .qvalid(qvalid[1]), .qack(qack[1]),
                   .fire(fire[1]), .status(status[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int sent [2] = '{0, 0};
  int got [2] = '{0, 0};
  int duplex [2] = '{0, 0};
  logic [W-1:0] expq0[$], expq1[$];   // bytes sent by side 0 / side 1

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d/%0d got %0d/%0d", sent[0], sent[1], got[0], got[1]);
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

  for (genvar s = 0; s < 2; s++) begin : side
    // bus driver
    int dstate = 0, ddelay = 0;
    always @(posedge clk) begin
      if (rst) begin
        ivalid[s] <= 1'b0; i_data[s] <= '0; dstate = 0;
      end else begin
        case (dstate)
          0: if (ddelay > 0) ddelay--;
             else if (sent[s] < N) begin
               logic [W-1:0] b;
               b = W'($urandom);
               i_data[s] <= b; ivalid[s] <= 1'b1;
               if (s == 0) expq0.push_back(b); else expq1.push_back(b);
               sent[s]++;
               dstate = 1;
             end
          1: if (iack[s]) begin ivalid[s] <= 1'b0; dstate = 2; end
          2: if (!iack[s]) begin dstate = 0; ddelay = $urandom_range(0, 5); end
          default: dstate = 0;
        endcase
      end
    end
    // bus reader
    int qstate = 0, qdelay = 0;
    always @(posedge clk) begin
      if (rst) begin
        qack[s] <= 1'b0; qstate = 0;
      end else begin
        case (qstate)
          0: if (qvalid[s]) begin
               logic [W-1:0] e;
               if (s == 0) begin
                 chk("side 0 byte expected", expq1.size() > 0);
                 e = (expq1.size() > 0) ? expq1.pop_front() : '0;
               end else begin
                 chk("side 1 byte expected", expq0.size() > 0);
                 e = (expq0.size() > 0) ? expq0.pop_front() : '0;
               end
               chk($sformatf("side %0d byte %h expected %h", s, q_data[s], e), q_data[s] == e);
               got[s]++;
               qdelay = $urandom_range(0, 3);
               qstate = 1;
             end
          1: if (qdelay > 0) qdelay--; else begin qack[s] <= 1'b1; qstate = 2; end
          2: if (!qvalid[s]) begin qdelay = $urandom_range(0, 2); qstate = 3; end
          3: if (qdelay > 0) qdelay--; else begin qack[s] <= 1'b0; qstate = 0; end
          default: qstate = 0;
        endcase
      end
    end
    always @(posedge clk) if (!rst && status[s].rx_busy && status[s].tx_busy) duplex[s]++;
  end

  initial begin
    int t0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    t0 = cyc;
    while (!(got[0] == N && got[1] == N)) @(posedge clk);
    $display("%0d bytes each way in %0d cycles (%0d cycles per byte and direction)",
             N, cyc - t0, (cyc - t0) / N);
    $display("full-duplex cycles: adaptor 0 %0d, adaptor 1 %0d", duplex[0], duplex[1]);
    chk("all bytes delivered", got[0] == N && got[1] == N && expq0.size() == 0 && expq1.size() == 0);
    chk("adaptor 0 full duplex", duplex[0] > 0);
    chk("adaptor 1 full duplex", duplex[1] > 0);
    // a byte needs at least its 11-bit packet plus the 2-bit acknowledgment
    chk("throughput bound", (cyc - t0) >= N * 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

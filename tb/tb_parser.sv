// tb_parser: self-checking test of the ParSer sub-net.
//
// Starts the sub-net with random bytes on the data input and records
// link_out bit by bit.  Each packet body must be the second start bit
// followed by the data bits from the top bit down, one per cycle; done must
// rise DATA_W+2 cycles after the start and stay until consume, during which
// link_out must stay low; busy must fall after consume.
module tb_parser;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst, start, consume;
  logic [W-1:0] data;
  logic link_out, done, busy;
  int checks = 0, failures = 0;

  parser #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    logic [W:0] body;
    int hold;
    rst = 1'b1; start = 1'b0; consume = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    chk("idle busy", busy, 1'b0);
    chk("idle link_out", link_out, 1'b0);
    for (int n = 0; n < 40; n++) begin
      data = W'($urandom);
      hold = $urandom_range(0, 4);
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      for (int k = W; k >= 0; k--) begin
        body[k] = link_out;
        chk("not done in body", done, 1'b0);
        @(posedge clk); #1;
      end
      checks++;
      if (body !== {1'b1, data}) begin
        failures++;
        $display("FAIL packet body %b expected %b", body, {1'b1, data});
      end
      for (int h = 0; h <= hold; h++) begin
        chk("done", done, 1'b1);
        chk("quiet while waiting", link_out, 1'b0);
        @(posedge clk); #1;
      end
      consume = 1'b1;
      @(posedge clk); #1 consume = 1'b0;
      chk("emptied", busy, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

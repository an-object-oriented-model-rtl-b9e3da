// tb_shift_register: self-checking test of the link adaptor's data register.
//
// Drives random shift_enable and link_in patterns and compares q every cycle
// with a reference that applies the rule "a shift ordered in cycle c takes the
// LinkIn level of cycle c+1 into bit 0".  A second part sends one byte the way
// the controller does (eight enables starting on the second start bit) and
// checks that exactly the data bits, first bit in Q7, are captured and that q
// holds afterwards.
module tb_shift_register;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst;
  logic shift_enable, link_in;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  shift_register #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] ref_q;
  logic pending;

  task automatic check(input string what, input logic [W-1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    logic [W-1:0] byte_v;
    logic [W+2:0] frame;
    rst = 1'b1; shift_enable = 1'b0; link_in = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ref_q = '0; pending = 1'b0;
    // Part 1: random stimulus against the reference.
    for (int c = 0; c < 500; c++) begin
      shift_enable = 1'($urandom_range(0, 1));
      link_in      = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (pending) ref_q = {ref_q[W-2:0], link_in};
      pending = shift_enable;
      #1 check("random", ref_q);
    end
    shift_enable = 1'b0;
    repeat (2) @(posedge clk);
    // Part 2: packets framed as on the link, enables as the controller gives.
    for (int n = 0; n < 20; n++) begin
      byte_v = W'($urandom);
      frame = {2'b11, byte_v, 1'b0};   // sent from the top bit down
      for (int b = W + 2; b >= 0; b--) begin
        link_in = frame[b];
        // enables in the bit periods of the second start bit and of the
        // first seven data bits
        shift_enable = (b <= W + 1) && (b >= 2);
        @(posedge clk);
        #1;
      end
      shift_enable = 1'b0; link_in = 1'b0;
      check("framed byte", byte_v);
      repeat (3) @(posedge clk);
      #1 check("byte held", byte_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

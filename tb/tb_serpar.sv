// tb_serpar: self-checking test of the SerPar sub-net.
//
// Marks the entry place with a one-cycle start pulse and checks, cycle by
// cycle, that shift_fire is high in exactly the DATA_W-1 cycles after the
// start, that done rises DATA_W cycles after the start, that the token waits
// in the last place for as long as consume stays low (random hold times),
// and that busy falls once the token has been taken.
module tb_serpar;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst, start, consume;
  logic done, busy, shift_fire;
  int checks = 0, failures = 0;

  serpar #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(input string what, input logic d, input logic b, input logic s);
    checks++;
    if (done !== d || busy !== b || shift_fire !== s) begin
      failures++;
      $display("FAIL %s: done=%b busy=%b shift=%b expected %b %b %b at %0t",
               what, done, busy, shift_fire, d, b, s, $time);
    end
  endtask

  initial begin
    int hold;
    rst = 1'b1; start = 1'b0; consume = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    expect3("idle", 1'b0, 1'b0, 1'b0);
    for (int n = 0; n < 30; n++) begin
      hold = $urandom_range(0, 6);
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      // cycles start+1 .. start+W-1: token in transit, shifting
      for (int k = 1; k < W; k++) begin
        expect3("transit", 1'b0, 1'b1, 1'b1);
        @(posedge clk); #1;
      end
      // token in the last place, waiting for consume
      for (int h = 0; h < hold; h++) begin
        expect3("waiting", 1'b1, 1'b1, 1'b0);
        @(posedge clk); #1;
      end
      expect3("last place", 1'b1, 1'b1, 1'b0);
      consume = 1'b1;
      @(posedge clk); #1 consume = 1'b0;
      expect3("emptied", 1'b0, 1'b0, 1'b0);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

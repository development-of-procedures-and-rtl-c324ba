// tb_reset_sync -- reset synchroniser: immediate assertion from either
// source, release exactly two rising clock edges after both are inactive.
module tb_reset_sync;
  logic clk = 0, in_async, sw_reset, out_sync;
  int checks = 0, failures = 0;

  reset_sync dut (.clk(clk), .in_async(in_async), .sw_reset(sw_reset), .out_sync(out_sync));

  always #25 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (out_sync !== exp) begin
      failures++;
      $display("FAIL %s: out_sync=%0b expected %0b at %0t", what, out_sync, exp, $time);
    end
  endtask

  // count clock edges from release until out_sync drops
  task automatic release_and_measure(input string what);
    int n = 0;
    while (out_sync && n < 10) begin
      @(posedge clk);
      #1;
      n++;
    end
    checks++;
    if (n != 2) begin
      failures++;
      $display("FAIL %s: released after %0d edges, expected 2", what, n);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_reset = 0;
    in_async = 0;             // button pressed
    #3;
    check(1, "button asserts");
    repeat (3) @(posedge clk);
    #5 in_async = 1;          // button released between edges
    check(1, "still held right after release");
    release_and_measure("button");
    repeat (4) @(posedge clk);
    check(0, "idle");
    // software reset asserts without a clock edge
    #7 sw_reset = 1;
    #1 check(1, "software reset asserts asynchronously");
    @(posedge clk);
    #5 sw_reset = 0;
    release_and_measure("software reset");
    // both together, released one after the other
    #3 in_async = 0; sw_reset = 1;
    @(posedge clk); #5 sw_reset = 0;
    repeat (3) @(posedge clk);
    #1 check(1, "button still pressed");
    #4 in_async = 1;
    release_and_measure("both");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

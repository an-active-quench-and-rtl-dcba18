`timescale 1ns / 1ps
// tb_hold_off_counter: self-checking test of the 8-bit J-K synchronous counter.
// After release from clear it must count 0,1,2,...,255 and wrap to 0, one step
// per rising clock edge (compared against an independent integer count), and a
// low clr_n must return it to 0 immediately and hold it there while clocked.
module tb_hold_off_counter;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         clr_n = 1'b0;
  logic [W-1:0] count;
  int           expected;
  int           checks = 0, failures = 0;
  int           wraps = 0;

  hold_off_counter dut (.clk, .clr_n, .count);

  always #3.25 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #0.5 check(int'(count), 0, "held in clear");
    @(negedge clk) clr_n = 1'b1;
    expected = 0;
    check(int'(count), 0, "starts at 0");
    // Two full turns: 0 -> 255 -> 0 -> 255 -> 0.
    repeat (2 * (1 << W)) begin
      @(posedge clk);
      #0.5;
      expected = (expected + 1) % (1 << W);
      if (expected == 0) wraps++;
      check(int'(count), expected, "binary up-count");
    end
    check(wraps, 2, "wrap-around count");
    // Clear in the middle of a count, between edges.
    repeat (37) @(posedge clk);
    #1 check(int'(count), 37, "count before clear");
    clr_n = 1'b0;
    #0.2 check(int'(count), 0, "asynchronous clear");
    repeat (5) @(posedge clk);
    #0.5 check(int'(count), 0, "stays cleared while clocked");
    @(negedge clk) clr_n = 1'b1;
    repeat (29) @(posedge clk);
    #0.5 check(int'(count), 29, "29 edges after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

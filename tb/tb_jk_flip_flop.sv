`timescale 1ns / 1ps
// tb_jk_flip_flop: self-checking test of the J-K flip-flop bit cell.
// Drives random J/K values over many clock edges and compares Q with the J-K
// characteristic equation Q+ = J&~Q | ~K&Q, then checks that the active-low
// clear forces Q to 0 at once, without a clock edge, and holds it there.
module tb_jk_flip_flop;

  logic clk = 1'b0;
  logic clr_n = 1'b0;
  logic j = 1'b0, k = 1'b0;
  logic q, q_n;
  logic q_ref;
  int   checks = 0, failures = 0;
  int   n_toggle = 0, n_set = 0, n_reset = 0, n_hold = 0;

  jk_flip_flop dut (.clk, .clr_n, .j, .k, .q, .q_n);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    check(q, 1'b0, "clear holds q low");
    check(q_n, 1'b1, "q_n while cleared");
    @(negedge clk) clr_n = 1'b1;
    q_ref = 1'b0;
    repeat (400) begin
      @(negedge clk);
      j = 1'($urandom);
      k = 1'($urandom);
      case ({j, k})
        2'b00: n_hold++;
        2'b01: n_reset++;
        2'b10: n_set++;
        default: n_toggle++;
      endcase
      q_ref = (j & ~q_ref) | (~k & q_ref);
      @(posedge clk);
      #1;
      check(q, q_ref, "characteristic equation");
      check(q_n, ~q_ref, "complement output");
    end
    // Asynchronous clear between clock edges.
    @(negedge clk) {j, k} = 2'b10;
    @(posedge clk) #1 check(q, 1'b1, "set before clear");
    #1 clr_n = 1'b0;
    #0.5 check(q, 1'b0, "asynchronous clear");
    {j, k} = 2'b11;
    repeat (3) @(posedge clk);
    #1 check(q, 1'b0, "clear overrides clock");
    checks++;
    if (n_hold == 0 || n_set == 0 || n_reset == 0 || n_toggle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

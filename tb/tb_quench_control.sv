`timescale 1ns / 1ps
// tb_quench_control: exhaustive test of the quench-pulse and clock-gate logic.
// Qp must be high only while an avalanche is sensed (compo) and the hold-off is
// running (Rn high); the counter clock must follow the oscillator only while
// Node A (= Rn) is high, and be blocked low after the code match.
module tb_quench_control;

  logic compo, rn, osc;
  logic qp, node_a, cnt_clk;
  int   checks = 0, failures = 0;

  quench_control dut (.compo, .rn, .osc, .qp, .node_a, .cnt_clk);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: compo=%0b rn=%0b osc=%0b got %0b", what, compo, rn, osc, got);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {compo, rn, osc} = 3'(v);
      #1;
      check(qp, (compo == 1'b1) && (rn == 1'b1), "qp");
      check(node_a, rn, "node_a");
      check(cnt_clk, (osc == 1'b1) && (rn == 1'b1), "cnt_clk");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

`timescale 1ns / 1ps
// tb_avalanche_comparator: checks the comparator model.
// compo must go high DELAY after the cathode voltage falls below Vref, stay
// unchanged before that, and fall DELAY after the cathode is back above Vref.
module tb_avalanche_comparator;

  localparam realtime DLY = 2.0;

  real  v_cathode = 3.3;
  real  v_ref = 2.5;
  logic compo;
  int   checks = 0, failures = 0;

  avalanche_comparator dut (.v_inn(v_cathode), .v_inp(v_ref), .compo);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
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
    #10 check(compo, 1'b0, "idle above Vref");
    for (int i = 0; i < 20; i++) begin
      real low = 2.49 - 0.1 * ($urandom % 20);
      v_cathode = low;
      #(DLY - 0.2) check(compo, 1'b0, "not before delay (fall)");
      #0.4        check(compo, 1'b1, "high after cathode drops");
      v_cathode = 2.51 + 0.04 * ($urandom % 20);
      #(DLY - 0.2) check(compo, 1'b1, "not before delay (rise)");
      #0.4        check(compo, 1'b0, "low after cathode recovers");
      #5;
    end
    // Moving the reference instead of the cathode.
    v_cathode = 2.0;
    v_ref = 1.5;
    #5 check(compo, 1'b0, "cathode above lowered Vref");
    v_ref = 2.2;
    #5 check(compo, 1'b1, "cathode below raised Vref");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

`timescale 1ns / 1ps
// tb_reset_buffers: checks the reset buffer chain model: a non-inverting delay
// of 2 ns from Rn to the PMOS gate, for both edges and for pulses of many widths.
module tb_reset_buffers;

  localparam realtime DLY = 2.0;

  logic rn = 1'b1;
  logic pmos_gate_n;
  int   checks = 0, failures = 0;

  reset_buffers dut (.rn, .pmos_gate_n);

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
    #10 check(pmos_gate_n, 1'b1, "idle off");
    for (int i = 0; i < 20; i++) begin
      realtime w = 3.0 + ($urandom % 40);
      rn = 1'b0;
      #(DLY - 0.1) check(pmos_gate_n, 1'b1, "PMOS still off before delay");
      #0.2         check(pmos_gate_n, 1'b0, "PMOS on after delay");
      #(w - DLY - 0.1);
      rn = 1'b1;
      #(DLY - 0.1) check(pmos_gate_n, 1'b0, "PMOS still on before delay");
      #0.2         check(pmos_gate_n, 1'b1, "PMOS off after delay");
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

`timescale 1ns / 1ps
// tb_code_match: exhaustive test of the counter/code equality detector.
// For every pair of 8-bit counter value and code, Rn must be low exactly when
// the two are equal.
module tb_code_match;

  localparam int unsigned W = 8;

  logic [W-1:0] count, code;
  logic         rn;
  int           checks = 0, failures = 0, n_match = 0;

  code_match dut (.count, .code, .rn);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < (1 << W); c++) begin
      for (int n = 0; n < (1 << W); n++) begin
        count = W'(n);
        code  = W'(c);
        #1;
        checks++;
        if (rn !== (n != c)) begin
          failures++;
          if (failures < 10) $display("FAIL count=%0d code=%0d rn=%0b", n, c, rn);
        end
        if (!rn) n_match++;
      end
    end
    checks++;
    if (n_match != (1 << W)) begin
      failures++;
      $display("FAIL match count %0d", n_match);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

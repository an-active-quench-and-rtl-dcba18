`timescale 1ns / 1ps
// tb_ring_oscillator: checks the gated ring-oscillator model.
// While disabled the output must rest high and not move. After enable, the
// n-th rising edge must come n x 6.5 ns after the enable (one hold-off step per
// period); after disable the output must stop at once and return high, and a
// new enable must restart with the same phase.
module tb_ring_oscillator;

  localparam realtime PERIOD = 6.5;

  logic    en = 1'b0;
  logic    osc;
  int      checks = 0, failures = 0;
  int      rises = 0;
  realtime t_en;
  realtime t_rise [$];

  ring_oscillator dut (.en, .osc);

  always @(posedge osc) if (en) t_rise.push_back($realtime - t_en);

  task automatic check_t(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: got %0.3f ns expected %0.3f ns", what, got, exp);
    end
  endtask

  task automatic check_b(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
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
    #20.3;
    check_b(osc, 1'b1, "rests high while disabled");
    for (int run = 0; run < 3; run++) begin
      int n = (run == 0) ? 40 : 5 + run;
      t_rise.delete();
      t_en = $realtime;
      en = 1'b1;
      #(PERIOD * n + 1.0);
      checks++;
      if (t_rise.size() != n) begin
        failures++;
        $display("FAIL run %0d: %0d rising edges, expected %0d", run, t_rise.size(), n);
      end
      foreach (t_rise[i]) check_t(t_rise[i], PERIOD * (i + 1), "rising edge time");
      #(PERIOD / 4.0);
      en = 1'b0;
      #0.01 check_b(osc, 1'b1, "returns high when disabled");
      #(PERIOD * 3) check_b(osc, 1'b1, "stays stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

`timescale 1ns / 1ps
// tb_aqr_ic_code_sweep: hold-off time against code over the whole range.
//
// Sweeps the hold-off code through every valid value, 1 to 255, with one photon
// per code, and measures the quench pulse width. Each width must be exactly
// code x 6.5 ns (one ring-oscillator period per count), so consecutive codes
// differ by one 6.5 ns step and the characteristic is linear from 6.5 ns to
// 1657.5 ns. Every avalanche must also end in an automatic reset that re-arms
// the APD.
module tb_aqr_ic_code_sweep;

  import aqr_pkg::*;

  logic               photon = 1'b0;
  logic               saturate = 1'b0;
  logic [COUNT_W-1:0] code = 8'd1;
  real                v_cathode;
  real                v_ref = VREF_V;
  logic               qp, pmos_gate_n, compo, rn;

  int      checks = 0, failures = 0;
  realtime t_rise, width, prev_width;

  aqr_ic dut (.v_cathode, .v_ref, .code, .qp, .pmos_gate_n, .compo, .rn);
  apd_frontend_model apd (.photon, .saturate, .qp, .pmos_gate_n, .v_cathode);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_width = 0.0;
    for (int c = 1; c < (1 << COUNT_W); c++) begin
      code = COUNT_W'(c);
      #10;
      photon = 1'b1;
      #1 photon = 1'b0;
      wait (qp);
      t_rise = $realtime;
      wait (!qp);
      width = $realtime - t_rise;
      check(width > c * OSC_PERIOD_NS - 0.01 && width < c * OSC_PERIOD_NS + 0.01,
            $sformatf("code %0d: hold-off %0.2f ns", c, width));
      if (c > 1) check(width - prev_width > OSC_PERIOD_NS - 0.01 &&
                       width - prev_width < OSC_PERIOD_NS + 0.01,
                       $sformatf("step from code %0d to %0d", c - 1, c));
      prev_width = width;
      wait (!compo);
      wait (pmos_gate_n && v_cathode >= apd.V_ARM);
    end
    check(apd.n_avalanche == (1 << COUNT_W) - 1, "one avalanche per code");
    check(apd.n_shoot_through == 0, "switches never on together");
    $display("longest hold-off %0.1f ns", prev_width);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

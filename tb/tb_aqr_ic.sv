`timescale 1ns / 1ps
// tb_aqr_ic: end-to-end test of the AQR circuit with every parameter at its
// default, driven by a behavioural APD front end.
//
// Single photons, one per hold-off code (the three published oscilloscope
// codes 29, 50 and 181, the extremes 1 and 255, and random codes):
//   * the quench pulse Qp must last code x 6.5 ns;
//   * the three published codes must land within 3 % of the measured
//     190 ns, 326 ns and 1.18 us, and code 255 must exceed 1.6 us;
//   * the counter must freeze on the code while Rn is low (clock blocked by
//     Node A although the oscillator still runs);
//   * the PMOS reset must start only after Qp has fallen, never overlapping it;
//   * after the reset the circuit must return to idle (counter 0, Rn high,
//     PMOS off, oscillator stopped), and a photon during hold-off is ignored.
// Then saturating light at code 1: avalanches follow back to back and the
// spacing (dead time) must be constant and longer than one hold-off step.
// Every mechanism is counted and a failure is counted for any that never occurs.
module tb_aqr_ic;

  import aqr_pkg::*;

  localparam realtime STEP_NS = OSC_PERIOD_NS;

  logic               photon = 1'b0;
  logic               saturate = 1'b0;
  logic [COUNT_W-1:0] code = 8'd29;
  real                v_cathode;
  real                v_ref = VREF_V;
  logic               qp, pmos_gate_n, compo, rn;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_sensed = 0, n_quench = 0, n_expiry = 0, n_clock_blocked = 0;
  int n_auto_reset = 0, n_counter_clear = 0, n_saturated = 0;

  realtime t_qp_rise, t_qp_fall, t_pmos_on;

  aqr_ic dut (
    .v_cathode, .v_ref, .code, .qp, .pmos_gate_n, .compo, .rn
  );

  apd_frontend_model apd (
    .photon, .saturate, .qp, .pmos_gate_n, .v_cathode
  );

  always @(posedge compo) n_sensed++;
  always @(posedge qp) n_quench++;
  always @(negedge rn) if (compo) n_expiry++;
  always @(negedge pmos_gate_n) n_auto_reset++;
  always @(negedge compo) n_counter_clear++;
  // Oscillator edges that Node A keeps away from the counter.
  always @(posedge dut.u_ring_osc.osc) if (!dut.node_a) n_clock_blocked++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit near(realtime got, realtime exp, realtime tol);
    return got >= exp - tol && got <= exp + tol;
  endfunction

  initial begin
    #60000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One avalanche with the given code; returns the measured hold-off (Qp width).
  task automatic one_shot(input logic [COUNT_W-1:0] c, input bit stray_photon,
                          output realtime hold_off);
    int quench_before = n_quench;
    int ignored_before = apd.n_ignored;
    code = c;
    #20;
    check(!qp && pmos_gate_n && !compo && rn, "idle before photon");
    check(dut.u_counter.count == 0, "counter idle at 0");
    photon = 1'b1;
    #1 photon = 1'b0;
    wait (qp);
    t_qp_rise = $realtime;
    if (stray_photon) begin
      #(STEP_NS * c / 2.0);
      photon = 1'b1;
      #1 photon = 1'b0;
    end
    wait (!qp);
    t_qp_fall = $realtime;
    hold_off = t_qp_fall - t_qp_rise;
    check(near(hold_off, STEP_NS * c, 0.05), $sformatf("hold-off for code %0d: %0.2f ns", c, hold_off));
    #0.1;
    check(!rn && compo, "Rn low at end of hold-off");
    check(dut.u_counter.count == c, "counter stopped on the code");
    wait (!pmos_gate_n);
    t_pmos_on = $realtime;
    check(t_pmos_on > t_qp_fall, "reset starts after hold-off");
    check(dut.u_counter.count == c, "counter still frozen when reset starts");
    // The reset must bring compo down within a bounded time, with the counter
    // held on the code and Qp staying low all the way.
    fork
      begin : reset_window
        fork
          wait (!compo);
          #(30.0);
        join_any
        disable fork;
      end
    join
    check(!compo, "compo falls within 30 ns of the reset");
    check(n_quench == quench_before + 1, "no second quench during the reset");
    wait (!compo);
    #0.1 check(dut.u_counter.count == 0, "counter cleared when compo falls");
    wait (pmos_gate_n);
    #(STEP_NS * 2);
    check(rn && !qp && pmos_gate_n, "back to idle");
    check(dut.u_ring_osc.osc == 1'b1, "oscillator stopped");
    check(n_quench == quench_before + 1, "one quench per photon");
    if (stray_photon) check(apd.n_ignored == ignored_before + 1, "photon during hold-off ignored");
    wait (v_cathode >= apd.V_ARM);
  endtask

  initial begin
    realtime h;
    int      random_codes;
    realtime gaps [$];
    int      n_prior;
    #5;

    // Published oscilloscope settings and measured hold-off times.
    one_shot(8'b0001_1101, 1'b1, h);
    check(near(h, 190.0, 190.0 * 0.03), "code 00011101 vs 190 ns");
    one_shot(8'b0011_0010, 1'b0, h);
    check(near(h, 326.0, 326.0 * 0.03), "code 00110010 vs 326 ns");
    one_shot(8'b1011_0101, 1'b1, h);
    check(near(h, 1180.0, 1180.0 * 0.03), "code 10110101 vs 1.18 us");
    // Ends of the range.
    one_shot(8'd1, 1'b0, h);
    one_shot(8'd255, 1'b1, h);
    check(h > 1600.0, "code 255 exceeds 1.6 us");
    // Random codes.
    random_codes = 6;
    repeat (random_codes) one_shot(8'(1 + ($urandom % 255)), 1'($urandom), h);

    // Saturating light, code 1: avalanches back to back.
    code = 8'd1;
    #20;
    saturate = 1'b1;
    repeat (12) begin
      n_prior = apd.n_avalanche;
      wait (apd.n_avalanche > n_prior);
      if (n_saturated > 0)
        gaps.push_back(apd.t_last_avalanche - apd.t_prev_avalanche);
      n_saturated++;
    end
    saturate = 1'b0;
    foreach (gaps[i]) begin
      if (i > 1) check(near(gaps[i], gaps[1], 0.2), $sformatf("constant dead time: gap %0d = %0.2f ns", i, gaps[i]));
    end
    // gaps[0] starts from a photon off the front end's time grid; use gaps[1].
    check(gaps[1] > STEP_NS, "dead time longer than one step");
    $display("saturated dead time %0.2f ns, count rate %0.1f Mcounts/s",
             gaps[1], 1000.0 / gaps[1]);

    check(apd.n_shoot_through == 0, "quench and reset switches never on together");
    $display("mechanisms: sensed=%0d quench=%0d expiry=%0d clock_blocked=%0d auto_reset=%0d counter_clear=%0d ignored_photons=%0d saturated=%0d",
             n_sensed, n_quench, n_expiry, n_clock_blocked, n_auto_reset, n_counter_clear,
             apd.n_ignored, n_saturated);
    check(n_sensed > 0, "avalanche sensed");
    check(n_quench > 0, "quench happened");
    check(n_expiry > 0, "hold-off expiry happened");
    check(n_clock_blocked > 0, "clock blocking by Node A happened");
    check(n_auto_reset > 0, "automatic reset happened");
    check(n_counter_clear > 0, "counter clear happened");
    check(apd.n_ignored > 0, "photon during hold-off happened");
    check(n_saturated > 0, "saturated operation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

`timescale 1ns / 1ps
// ring_oscillator: BEHAVIOURAL MODEL (not synthesizable) of the gated ring
// oscillator that clocks the hold-off counter.
//
// On silicon this is a chain of inverting stages closed into a loop through a
// gate that the comparator output compo enables; the stage count sets the
// period, which the published chip trims to about 6.5 ns (one hold-off step).
// The model reproduces only the terminal behaviour:
//   * en low  : osc rests high and the loop is stopped;
//   * en high : osc first falls half a period after en rises, then toggles
//               every half period, so its n-th rising edge comes n periods
//               after en rose;
//   * en falls: the oscillation stops at once and osc returns high.
// The 6.5 ns period is the published step; the rest level and the start-up
// phase are this model's own choice.
module ring_oscillator #(
  parameter realtime PERIOD_NS = aqr_pkg::OSC_PERIOD_NS
) (
  input  logic en,   // compo: run while high
  output logic osc   // oscillator output
);

  initial osc = 1'b1;

  always begin
    wait (en);
    fork
      forever begin
        #(PERIOD_NS / 2.0);
        osc = ~osc;
      end
      wait (!en);
    join_any
    disable fork;
    osc = 1'b1;
  end

endmodule

`timescale 1ns / 1ps
// avalanche_comparator: BEHAVIOURAL MODEL (not synthesizable) of the analog
// comparator that senses an avalanche at the APD cathode.
//
// The cathode is wired to the inverting input and a reference voltage to the
// non-inverting input, so compo goes high when the cathode falls below Vref
// (avalanche current through the sensing resistor, or the cathode pulled to
// ground during quench) and low again once the reset has pulled the cathode
// back above Vref. Voltages are carried as real numbers in volts; the output
// follows the input comparison after DELAY_NS (transport delay).
// Which input is inverting follows the published block diagram; the delay and
// the absence of hysteresis are this model's own choices.
module avalanche_comparator #(
  parameter realtime DELAY_NS = aqr_pkg::COMP_DELAY_NS
) (
  input  real  v_inn,  // inverting input: APD cathode voltage [V]
  input  real  v_inp,  // non-inverting input: reference Vref [V]
  output logic compo   // high while v_inn < v_inp
);

  initial compo = 1'b0;

  always @(v_inn or v_inp) begin
    compo <= #(DELAY_NS) (v_inn < v_inp);
  end

endmodule

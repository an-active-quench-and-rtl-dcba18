`timescale 1ns / 1ps
// aqr_ic: active quench and reset circuit for a Geiger-mode avalanche photodiode
// (GM-APD) with a digitally programmed hold-off time.
//
// Operation (one avalanche):
//   1. Idle: compo = 0, the ring oscillator is stopped, the counter is held at
//      0, Qp = 0 and the PMOS gate is high (both switches off). With a non-zero
//      code, Rn = 1.
//   2. An avalanche pulls the cathode below Vref: compo rises. Qp rises (NMOS on,
//      the cathode is pulled to ground: quench), the ring oscillator starts, and
//      the counter counts its periods.
//   3. When the counter equals the code, Rn falls: Qp falls (quench ends), Node A
//      blocks the counter clock so the count freezes on the code and Rn stays
//      low, and after the buffer delay the PMOS turns on and recharges the
//      cathode (reset).
//   4. The cathode rises above Vref: compo falls, the oscillator stops, the
//      counter clears, Rn rises and the PMOS turns off. The APD is armed again.
// The hold-off (Qp high) therefore lasts code x oscillator period, about
// code x 6.5 ns. Code 0 is not a valid setting: the counter rests at 0, so Rn
// would stay low and the PMOS would stay on.
//
// The comparator, ring oscillator and buffer chain are analog on silicon and
// are behavioural models here; the counter, the comparison and the control
// gates are synthesizable logic. The APD, its sensing resistor and the NMOS and
// PMOS switches sit outside this module: the cathode voltage comes in as a real
// number and the two switch gate drives go out.
// Block structure and signal names follow the published block diagram; the
// model delays and the exact gate functions are this design's own choices.
module aqr_ic (
  input  real                         v_cathode,    // APD cathode voltage [V]
  input  real                         v_ref,        // comparator reference [V]
  input  logic [aqr_pkg::COUNT_W-1:0] code,         // Input7..Input0 hold-off code
  output logic                        qp,           // quench pulse: NMOS gate
  output logic                        pmos_gate_n,  // reset: PMOS gate, active low
  output logic                        compo,        // comparator output
  output logic                        rn            // code match, active low
);

  import aqr_pkg::*;

  logic               osc;
  logic               node_a;
  logic               cnt_clk;
  logic [COUNT_W-1:0] count;

  avalanche_comparator u_comparator (
    .v_inn (v_cathode),
    .v_inp (v_ref),
    .compo (compo)
  );

  ring_oscillator u_ring_osc (
    .en  (compo),
    .osc (osc)
  );

  quench_control u_control (
    .compo   (compo),
    .rn      (rn),
    .osc     (osc),
    .qp      (qp),
    .node_a  (node_a),
    .cnt_clk (cnt_clk)
  );

  hold_off_counter #(.WIDTH(COUNT_W)) u_counter (
    .clk   (cnt_clk),
    .clr_n (compo),
    .count (count)
  );

  code_match #(.WIDTH(COUNT_W)) u_match (
    .count (count),
    .code  (code),
    .rn    (rn)
  );

  reset_buffers u_buffers (
    .rn          (rn),
    .pmos_gate_n (pmos_gate_n)
  );

endmodule

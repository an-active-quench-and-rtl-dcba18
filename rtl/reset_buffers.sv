`timescale 1ns / 1ps
// reset_buffers: BEHAVIOURAL MODEL (not synthesizable) of the buffer chain
// between the match signal Rn and the gate of the PMOS reset switch.
//
// Rn low ends the hold-off: it first drops Qp (NMOS quench switch off) and,
// through these buffers, turns the PMOS switch on a little later, so the two
// switches are never on together and the reset starts only after the hold-off
// has ended. The PMOS conducts while its gate (pmos_gate_n) is low.
// The model is a non-inverting transport delay of DELAY_NS; the existence and
// purpose of the buffers are published, the delay value is this model's choice.
module reset_buffers #(
  parameter realtime DELAY_NS = aqr_pkg::BUF_DELAY_NS
) (
  input  logic rn,           // code match, active low
  output logic pmos_gate_n   // PMOS reset switch gate, active low
);

  initial pmos_gate_n = 1'b1;

  always @(rn) begin
    pmos_gate_n <= #(DELAY_NS) rn;
  end

endmodule

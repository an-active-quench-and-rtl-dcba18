`timescale 1ns / 1ps
// quench_control: the two small gates of the AQR control path.
//
// * Quench pulse Qp drives the NMOS switch that pulls the APD cathode to ground.
//   Qp is high while the comparator reports an avalanche (compo = 1) and the
//   hold-off has not yet expired (Rn = 1): Qp = compo AND Rn.
// * Node A gates the ring-oscillator clock into the counter. Node A follows Rn,
//   so once the counter reaches the code the clock is blocked, the counter
//   freezes on the code, and Rn stays low for the whole reset phase:
//   cnt_clk = osc AND node_a.
//
// Combinational, no state. When Qp rises and falls, and what Node A does, come
// from the published description; the logic functions that produce them are
// the simplest ones that do that and are this design's own reading.
module quench_control (
  input  logic compo,    // comparator output, high during an avalanche / hold-off
  input  logic rn,       // code match, active low
  input  logic osc,      // ring-oscillator output
  output logic qp,       // quench pulse to the NMOS switch
  output logic node_a,   // clock enable for the counter
  output logic cnt_clk   // gated counter clock
);

  always_comb begin
    qp      = compo & rn;
    node_a  = rn;
    cnt_clk = osc & node_a;
  end

endmodule

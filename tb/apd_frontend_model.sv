`timescale 1ns / 1ps
// apd_frontend_model: testbench-only behavioural model of what sits around the
// AQR circuit: the Geiger-mode APD, its sensing resistor, and the NMOS (quench)
// and PMOS (reset) switches on the cathode.
//
// The cathode voltage is integrated in fixed time steps:
//   * NMOS on (qp high)          : cathode falls toward ground (quench);
//   * PMOS on (pmos_gate_n low)  : cathode rises toward Vdd (reset);
//   * avalanche, no switch on    : the avalanche current through the sensing
//                                  resistor pulls the cathode down to V_AVAL;
//   * otherwise                  : the cathode holds its voltage.
// A rising edge on `photon` starts an avalanche only when the APD is armed
// (cathode near Vdd, i.e. biased above breakdown); otherwise the photon is
// counted as ignored. The avalanche stops once the cathode has been quenched
// below V_QUENCHED. With `saturate` high a photon is absorbed as soon as the
// APD is armed again (saturating light). Both switches on at once is counted.
module apd_frontend_model #(
  parameter real     VDD         = 3.3,
  parameter real     V_AVAL      = 2.0,
  parameter real     V_ARM       = 3.0,
  parameter real     V_QUENCHED  = 0.3,
  parameter real     SLEW_AVAL   = 1.5,   // V/ns
  parameter real     SLEW_QUENCH = 3.3,   // V/ns
  parameter real     SLEW_RESET  = 0.5 ,  // V/ns
  parameter realtime STEP        = 0.05   // ns
) (
  input  logic photon,
  input  logic saturate,
  input  logic qp,
  input  logic pmos_gate_n,
  output real  v_cathode
);

  logic    avalanche = 1'b0;
  int      n_avalanche = 0;
  int      n_ignored = 0;
  int      n_shoot_through = 0;
  realtime t_last_avalanche = 0.0;
  realtime t_prev_avalanche = 0.0;

  function automatic bit armed();
    return !avalanche && v_cathode >= V_ARM;
  endfunction

  task automatic start_avalanche();
    avalanche        = 1'b1;
    n_avalanche++;
    t_prev_avalanche = t_last_avalanche;
    t_last_avalanche = $realtime;
  endtask

  initial v_cathode = VDD;

  always @(posedge photon) begin
    if (armed()) start_avalanche();
    else n_ignored++;
  end

  initial begin
    forever begin
      #(STEP);
      if (qp && !pmos_gate_n) n_shoot_through++;
      if (qp) begin
        v_cathode = (v_cathode - SLEW_QUENCH * STEP > 0.0) ? v_cathode - SLEW_QUENCH * STEP : 0.0;
      end else if (!pmos_gate_n) begin
        v_cathode = (v_cathode + SLEW_RESET * STEP < VDD) ? v_cathode + SLEW_RESET * STEP : VDD;
      end else if (avalanche && v_cathode > V_AVAL) begin
        v_cathode = (v_cathode - SLEW_AVAL * STEP > V_AVAL) ? v_cathode - SLEW_AVAL * STEP : V_AVAL;
      end
      if (avalanche && v_cathode <= V_QUENCHED) avalanche = 1'b0;
      if (saturate && armed()) start_avalanche();
    end
  end

endmodule

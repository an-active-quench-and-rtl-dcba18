`timescale 1ns / 1ps
// hold_off_counter: WIDTH-bit synchronous binary up-counter built from J-K
// flip-flops, used to time the APD hold-off period.
//
// Every flip-flop is clocked by the same (gated) ring-oscillator clock. J and K
// of each stage are tied together: stage 0 sees a constant 1 and toggles on
// every edge; stage i toggles when all lower stages are 1 (an AND chain of
// Q0..Q(i-1)), which makes the register count 0, 1, 2, ... 2^WIDTH-1 and wrap.
// The counter is cleared asynchronously and held at 0 while clr_n (the
// comparator output compo) is low, and counts while it is high.
//
// Timing: count advances on every rising edge of clk; the clear acts at once.
// The structure (8 J-K cells, common clock, J=K, stage 0 tied to Vdd, carry
// chain, clear from compo) follows the published schematic; the carry chain is
// written as AND gates because a binary up-count needs them.
module hold_off_counter #(
  parameter int unsigned WIDTH = aqr_pkg::COUNT_W
) (
  input  logic             clk,    // gated ring-oscillator clock
  input  logic             clr_n,  // compo: low holds the counter at 0
  output logic [WIDTH-1:0] count   // Q(WIDTH-1)..Q0
);

  // toggle[i] drives J and K of stage i.
  logic [WIDTH-1:0] toggle;

  assign toggle[0] = 1'b1;  // first stage: J = K = Vdd

  for (genvar i = 1; i < WIDTH; i++) begin : g_carry
    assign toggle[i] = toggle[i-1] & count[i-1];
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    jk_flip_flop u_ff (
      .clk   (clk),
      .clr_n (clr_n),
      .j     (toggle[i]),
      .k     (toggle[i]),
      .q     (count[i]),
      .q_n   ()
    );
  end

endmodule

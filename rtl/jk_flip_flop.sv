`timescale 1ns / 1ps
// jk_flip_flop: positive-edge J-K flip-flop with an active-low asynchronous clear.
//
// This is the bit cell of the hold-off counter. On a rising clock edge the
// output holds (J=K=0), clears (K=1), sets (J=1) or toggles (J=K=1). While
// clr_n is low the output is forced to 0 regardless of the clock. The counter
// ties J and K together, so only hold and toggle are used there. The J-K cell
// and its clear input follow the counter schematic; the edge polarity and the
// clear polarity are this design's choice.
module jk_flip_flop (
  input  logic clk,    // counter clock (gated ring oscillator)
  input  logic clr_n,  // asynchronous clear, active low
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      q <= 1'b0;
    end else begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= ~q;
      endcase
    end
  end

  assign q_n = ~q;

endmodule

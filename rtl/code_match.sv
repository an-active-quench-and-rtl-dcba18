`timescale 1ns / 1ps
// code_match: equality detector between the hold-off counter and the external
// hold-off code; its output Rn is active low.
//
// Each counter bit Qi is XNORed with the user input Inputi; when all XNOR
// outputs are 1 (counter equals code) the combining gate pulls Rn low. Rn low
// ends the hold-off (Qp low), starts the reset via the buffer chain, and stops
// the counter clock (Node A). Purely combinational, no clock.
// The per-bit XNOR and the active-low Rn follow the published block diagram.
module code_match #(
  parameter int unsigned WIDTH = aqr_pkg::COUNT_W
) (
  input  logic [WIDTH-1:0] count,  // Q(WIDTH-1)..Q0
  input  logic [WIDTH-1:0] code,   // Input(WIDTH-1)..Input0
  output logic             rn      // low when count == code
);

  logic [WIDTH-1:0] bit_equal;

  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++) begin
      bit_equal[i] = ~(count[i] ^ code[i]);  // XNOR per bit
    end
    rn = ~(&bit_equal);
  end

endmodule

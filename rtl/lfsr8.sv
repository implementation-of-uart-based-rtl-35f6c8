// Linear feedback shift register, the pseudo-random pattern source of the
// self test.
//
// Galois (internal-XOR) form, as drawn in the design: stage 0 takes the last
// stage q[WIDTH-1] directly, and every stage i whose POLY bit is set takes
// q[i-1] XOR q[WIDTH-1]; the others take q[i-1]. POLY holds the polynomial's
// coefficients of x^0..x^(WIDTH-1) (x^WIDTH is implied). The default 8'h63 is
// x^8 + x^6 + x^5 + x + 1: the x^8, x^6 and x^5 terms and the constant are
// the document's, and the x term matches the third XOR of its drawing; this
// polynomial is primitive, so from any nonzero seed the register runs through
// all 255 nonzero states. The seed is this design's choice.
//
// Timing: en advances the register one step on the rising edge; clear
// (synchronous) reloads SEED, as does rst.
module lfsr8 #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] POLY  = 8'h63,
  parameter logic [WIDTH-1:0] SEED  = 8'h01
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] nxt;

  always_comb begin
    nxt[0] = q[WIDTH-1];
    for (int i = 1; i < WIDTH; i++)
      nxt[i] = q[i-1] ^ (POLY[i] & q[WIDTH-1]);
  end

  always_ff @(posedge clk) begin
    if (rst || clear)
      q <= SEED;
    else if (en)
      q <= nxt;
  end

  initial assert (SEED != '0) else $error("lfsr8: an all-zero seed locks the register");

endmodule

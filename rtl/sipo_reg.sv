// Serial-in parallel-out register, the receiver buffer register.
//
// Each shift pulse moves the serial input into the top bit and every bit one
// place down, so a word arriving least significant bit first is in place,
// bit i at q[i], after WIDTH shifts. The parallel output q is the character
// handed to the peripheral (R0-R7).
//
// Timing: shift and si sampled on the rising edge; q is registered.
module sipo_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             shift,
  input  logic             si,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)
      q <= '0;
    else if (shift)
      q <= {si, q[WIDTH-1:1]};
  end

endmodule

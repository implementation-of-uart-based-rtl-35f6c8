// Serial-in serial-out register: a chain of WIDTH D flip-flops, D-ff WIDTH-1
// down to D-ff 0.
//
// On a shift pulse the serial input enters D-ff WIDTH-1 and every flop passes
// its bit to the next lower one; the serial output is D-ff 0. A word shifted in
// least significant bit first therefore sits with bit i in D-ff i after WIDTH
// shifts, and leaves least significant bit first when shifted out. The chain
// is used as the transmitter output register and the receiver input register.
//
// Timing: shift and si sampled on the rising edge; so is registered.
module siso_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic shift,
  input  logic si,
  output logic so
);

  logic [WIDTH-1:0] ff;

  always_ff @(posedge clk) begin
    if (rst)
      ff <= '0;
    else if (shift)
      ff <= {si, ff[WIDTH-1:1]};
  end

  assign so = ff[0];

endmodule

// One-clock delay between the down counter and the PISO's Reg_load.
//
// A single D flip-flop: q is d one clock cycle later. Reset clears it.
module clk_delay (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst)
      q <= 1'b0;
    else
      q <= d;
  end

endmodule

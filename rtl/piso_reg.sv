// Parallel-in serial-out register (PISO) with the design's two control
// inputs, Reg_load and sel.
//
// reg_load copies d into the register. While sel is 0 every shift pulse moves
// the register one place toward bit 0; the serial output ps is bit 0, so the
// least significant bit leaves first. sel = 1 holds the contents, which is how
// the design freezes the buffer while the register it feeds is not ready (the
// design does this by stopping the block's clock; here it is a clock enable).
// Bit 0 is rotated back into the top position, so after WIDTH shifts the
// register again holds what was loaded and pp shows the whole word: the test
// pattern generator relies on this to pass the same pattern on in parallel.
// The rotation is this design's choice; the load, hold and shift functions
// follow the document.
//
// Timing: all inputs sampled on the rising edge; reg_load wins over shift.
module piso_reg #(
  parameter int unsigned WIDTH     = 8,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             reg_load,
  input  logic             sel,
  input  logic             shift,
  input  logic [WIDTH-1:0] d,
  output logic             ps,
  output logic [WIDTH-1:0] pp
);

  always_ff @(posedge clk) begin
    if (rst)
      pp <= RESET_VAL;
    else if (reg_load)
      pp <= d;
    else if (shift && !sel)
      pp <= {pp[0], pp[WIDTH-1:1]};
  end

  assign ps = pp[0];

endmodule

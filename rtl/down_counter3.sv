// 3-bit down counter of the test pattern generator.
//
// The counter starts at 7 and counts down by one on every bit trigger. The
// trigger on which it is at 0 (the eighth bit of a pattern) raises tc for that
// clock cycle, and the counter wraps back to 7 for the next pattern. clear
// (synchronous) restarts it at 7.
//
// Timing: count is registered; tc is combinational (trig and count == 0).
module down_counter3 (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       trig,
  output logic [2:0] count,
  output logic       tc
);

  always_ff @(posedge clk) begin
    if (rst || clear)
      count <= 3'd7;
    else if (trig)
      count <= count - 3'd1;
  end

  assign tc = trig && (count == 3'd0);

endmodule

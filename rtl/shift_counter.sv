// Shift counter of the transmitter (the COUNTER boxes of the transmitter's
// internal architecture, with clk, rst, shift, load and op pins).
//
// A load starts a new count at zero and drops op. Every shift increments the
// count; when WIDTH shifts have been counted op rises and stays high, and
// further shifts are ignored, until the next load. After reset op is high,
// meaning "nothing pending". The transmitter buffer uses op as Tx_Rdy and the
// output register uses one to know when all data bits have left. How the
// counter counts is not spelled out by the design; this is the simplest
// counter that gives the op behaviour both uses need.
//
// Timing: load and shift are sampled on the rising clock edge; op and count
// are registered. load wins over shift.
module shift_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       load,
  input  logic                       shift,
  output logic [$clog2(WIDTH+1)-1:0] count,
  output logic                       op
);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      op    <= 1'b1;
    end else if (load) begin
      count <= '0;
      op    <= 1'b0;
    end else if (shift && !op) begin
      count <= count + 1'b1;
      op    <= (count == ($clog2(WIDTH+1))'(WIDTH - 1));
    end
  end

endmodule

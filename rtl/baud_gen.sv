// Baud generator: divides the system clock down to the bit rate.
//
// tick is high for one clock cycle every DIVISOR cycles. The transmitter and
// the receiver both use it as their bit clock (TxC and RxC) in the form of a
// clock enable, so the whole design runs on one clock. The design only names
// the baud generator; the divider and its default of 16 are this design's.
// DIVISOR must be at least 10 so the receiver can pass a character to its
// buffer (8 cycles) between two bit times.
module baud_gen #(
  parameter int unsigned DIVISOR = 16
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  logic [$clog2(DIVISOR)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == ($clog2(DIVISOR))'(DIVISOR - 1));
      cnt  <= (cnt == ($clog2(DIVISOR))'(DIVISOR - 1)) ? '0 : cnt + 1'b1;
    end
  end

  initial assert (DIVISOR >= 10) else $error("baud_gen: DIVISOR must be at least 10");

endmodule

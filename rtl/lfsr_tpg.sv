// Test pattern generator: LFSR, PISO, 3-bit down counter and one-clock delay.
//
// The LFSR's eight flip-flop outputs q0..q7 feed the PISO, whose sel input is
// tied to 0 so it shifts on every bit trigger. Each trigger puts the next
// pattern bit on ps (serial output, least significant bit first, toward the
// receiver) and counts the down counter from 7 toward 0. The trigger at which
// the counter is at 0 is the eighth; it advances the LFSR to the next pattern,
// and one clock later (the delay) pp_load pulses: in that cycle pp holds the
// whole pattern just sent serially (the PISO has rotated back to it), to be
// passed in parallel to the transmitter, and the PISO loads the next pattern
// (Reg_load). clear restarts the sequence at the seed. The structure, the
// polynomial and the serial-then-parallel order follow the design; the
// rotating PISO and the seed are this design's.
//
// Timing: triggers must be at least 2 clock cycles apart; pp_load comes one
// cycle after the eighth trigger.
module lfsr_tpg #(
  parameter logic [7:0] POLY = 8'h63,
  parameter logic [7:0] SEED = 8'h01
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       trig,
  output logic       ps,
  output logic [7:0] pp,
  output logic       pp_load
);

  logic [7:0] lfsr_q;
  logic [2:0] unused_count;
  logic       tc;
  logic       reg_load;

  lfsr8 #(.WIDTH(8), .POLY(POLY), .SEED(SEED)) u_lfsr (
    .clk, .rst, .clear, .en(tc), .q(lfsr_q)
  );

  piso_reg #(.WIDTH(8), .RESET_VAL(SEED)) u_piso (
    .clk, .rst(rst || clear), .reg_load, .sel(1'b0), .shift(trig), .d(lfsr_q),
    .ps, .pp
  );

  down_counter3 u_cnt (.clk, .rst, .clear, .trig, .count(unused_count), .tc);

  clk_delay u_dly (.clk, .rst(rst || clear), .d(tc), .q(reg_load));

  assign pp_load = reg_load;

endmodule

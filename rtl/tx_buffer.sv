// Transmitter buffer register ("Tx Buffer"): an 8-bit PISO and its counter.
//
// A write (wr) while the buffer is free (tx_rdy = 1) loads db into the PISO in
// parallel and starts the counter, which drops tx_rdy. While the output
// register reports itself empty (op_reg_empty = 1) the buffer then shifts one
// bit per clock into it, least significant bit first, on buf_op with the
// strobe buf_shift; while the output register is busy the PISO is held
// (sel = 1). When the counter has seen 8 shifts its op output raises tx_rdy
// again. This follows the design's Tx Buffer: PISO with sel and Reg_load, a
// counter whose output is Tx_Rdy, and the output register's empty flag as
// input. A write while tx_rdy is low is ignored, as the host is expected to
// wait for TxRDY; that rule is this design's, and an assertion reports it.
//
// Timing: a write is accepted on the clock edge where wr and tx_rdy are both
// high; shifting starts on the next cycle and takes 8 cycles.
module tx_buffer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] db,
  input  logic             op_reg_empty,
  output logic             tx_rdy,
  output logic             buf_op,
  output logic             buf_shift
);

  logic             reg_load;
  logic             piso_sel;
  logic [WIDTH-1:0] unused_pp;
  logic [$clog2(WIDTH+1)-1:0] unused_count;

  assign reg_load  = wr && tx_rdy;
  assign piso_sel  = !op_reg_empty;
  assign buf_shift = !tx_rdy && op_reg_empty;

  piso_reg #(.WIDTH(WIDTH)) u_piso (
    .clk, .rst, .reg_load, .sel(piso_sel), .shift(!tx_rdy), .d(db),
    .ps(buf_op), .pp(unused_pp)
  );

  shift_counter #(.WIDTH(WIDTH)) u_cnt (
    .clk, .rst, .load(reg_load), .shift(buf_shift), .count(unused_count), .op(tx_rdy)
  );

  property p_no_write_when_full;
    @(posedge clk) disable iff (rst) wr |-> tx_rdy;
  endproperty
  a_no_write_when_full: assert property (p_no_write_when_full)
    else $warning("tx_buffer: write while the buffer is full was ignored");

endmodule

// UART transmitter: transmitter buffer register, transmitter output register
// and their control.
//
// The host writes a byte (wr with db) when txrdy is high. The buffer hands it
// bit by bit to the output register as soon as that register is empty, which
// frees the buffer (txrdy high again) while the previous or current character
// is still on the line, so the host can queue one character ahead. The
// output register frames the byte (start bit, 8 data bits LSB first, stop
// bit) and sends it on txd at the baud rate once ack is high. txe is high when
// neither the buffer nor the output register holds a character. The split into
// buffer, output register and control signals TxRDY and TxE follows the
// design; the transmitter control logic is spread over the two registers'
// small sequencers.
//
// Timing: a character written into an idle transmitter starts its start bit
// at the first baud tick that comes at least 10 clock cycles after the write
// (1 cycle to load, 8 to shift into the output register, 1 to settle).
module uart_tx #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] db,
  input  logic             baud_tick,
  input  logic             ack,
  output logic             txd,
  output logic             txrdy,
  output logic             txe
);

  logic buf_op, buf_shift, op_reg_empty, out_empty;

  tx_buffer #(.WIDTH(WIDTH)) u_buf (
    .clk, .rst, .wr, .db, .op_reg_empty, .tx_rdy(txrdy), .buf_op, .buf_shift
  );

  tx_output_register #(.WIDTH(WIDTH)) u_out (
    .clk, .rst, .ip(buf_op), .ip_shift(buf_shift), .buf_empty(txrdy),
    .baud_tick, .ack, .txd, .txe(out_empty), .op_reg_empty
  );

  assign txe = out_empty && txrdy;

endmodule

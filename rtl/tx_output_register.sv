// Transmitter output register ("Tx Output Register"): an 8-bit SISO, a data
// bit counter and the framing sequence.
//
// The register is filled serially from the transmitter buffer (ip with strobe
// ip_shift); when the buffer reports itself empty again (buf_empty) the word
// is complete. The register then waits for a bit tick with ack high and sends
// one frame on txd: a start bit (0), the 8 data bits least significant first
// (shifted out of D-ff 0), and a stop bit (1), one bit per baud tick. txd is
// 1 when idle. The counter, loaded at the start bit, tells when all data bits
// are out. txe is high while the register holds nothing, and op_reg_empty
// tells the buffer it may shift (empty or being filled).
// The SISO, counter and the ip, clk, Buf_empty, rst, ack and TxD/TxE pins
// follow the design. Start and stop bits follow the design's statement that a
// UART adds them; ack is read as the remote side's ready signal and only
// gates the start of a frame. Both readings are this design's.
//
// Timing: txd is registered and changes on the clock edge that ends a cycle
// with baud_tick high; each bit lasts one baud period.
module tx_output_register
  import uart_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_BITS
) (
  input  logic clk,
  input  logic rst,
  input  logic ip,
  input  logic ip_shift,
  input  logic buf_empty,
  input  logic baud_tick,
  input  logic ack,
  output logic txd,
  output logic txe,
  output logic op_reg_empty
);

  tx_state_t state;
  logic      so;
  logic      sr_shift;
  logic      sr_in;
  logic      cnt_load;
  logic      cnt_shift;
  logic      cnt_op;
  logic [$clog2(WIDTH+1)-1:0] unused_count;

  // The SISO shifts on fill strobes and on the data-bit ticks.
  always_comb begin
    sr_shift  = 1'b0;
    sr_in     = ip;
    cnt_load  = 1'b0;
    cnt_shift = 1'b0;
    unique case (state)
      TX_EMPTY, TX_FILLING: sr_shift = ip_shift;
      TX_READY:             cnt_load = baud_tick && ack;
      TX_START:             begin sr_shift = baud_tick; cnt_shift = baud_tick; sr_in = 1'b0; end
      TX_DATA:              begin sr_shift = baud_tick && !cnt_op; cnt_shift = sr_shift; sr_in = 1'b0; end
      TX_STOP:              ;
      default:              ;
    endcase
  end

  siso_reg #(.WIDTH(WIDTH)) u_siso (.clk, .rst, .shift(sr_shift), .si(sr_in), .so);

  shift_counter #(.WIDTH(WIDTH)) u_cnt (
    .clk, .rst, .load(cnt_load), .shift(cnt_shift), .count(unused_count), .op(cnt_op)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= TX_EMPTY;
      txd   <= 1'b1;
    end else begin
      unique case (state)
        TX_EMPTY:   if (ip_shift) state <= TX_FILLING;
        TX_FILLING: if (buf_empty && !ip_shift) state <= TX_READY;
        TX_READY:   if (baud_tick && ack) begin txd <= 1'b0; state <= TX_START; end
        TX_START:   if (baud_tick) begin txd <= so; state <= TX_DATA; end
        TX_DATA:    if (baud_tick) begin
                      if (cnt_op) begin txd <= 1'b1; state <= TX_STOP; end
                      else        txd <= so;
                    end
        TX_STOP:    if (baud_tick) state <= TX_EMPTY;
        default:    state <= TX_EMPTY;
      endcase
    end
  end

  assign txe          = (state == TX_EMPTY);
  assign op_reg_empty = (state == TX_EMPTY) || (state == TX_FILLING);

endmodule

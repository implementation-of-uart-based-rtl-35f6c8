// UART receiver: input register, receiver buffer register and receiver
// control logic.
//
// rxd is first passed through two flip-flops to bring it into the clock
// domain. The receiver samples the line once per baud tick (RxC). While the
// receiver is enabled (en_n low) and idle, a 0 sample is taken as a start
// bit; the next 8 samples are shifted into the input register (an 8-bit SISO)
// and the sample after them is the stop bit. A 0 stop bit raises framing_err
// for one cycle; the character is still delivered. The input register then
// shifts its 8 bits, one per clock, into the receiver buffer register (an
// 8-bit SIPO); after the 8th bit the buffer is full: rxfull rises, and rxrdy
// too while the receiver is enabled. A read by the peripheral (peri_rqt)
// empties the buffer. If a character completes while the buffer is still
// full it is dropped and overrun_err pulses. The SISO-to-SIPO path, the
// buffer-full flag and the RxRDY, Rxfull, Peri_RQT and En_BAR signals follow
// the design; the start/stop framing, the sampling at one sample per bit and
// the error rules are this design's. Sampling once per bit assumes the
// sender's bit clock matches RxC, as it does when the design's own transmitter
// is looped back.
//
// Timing: rdata is valid while rxfull is high. The buffer fills 9 clock cycles
// after the tick that samples the stop bit. The baud period must be at least
// 10 clock cycles so the transfer ends before the next sample.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_BITS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rxd,
  input  logic             baud_tick,
  input  logic             en_n,
  input  logic             peri_rqt,
  output logic [WIDTH-1:0] rdata,
  output logic             rxrdy,
  output logic             rxfull,
  output logic             framing_err,
  output logic             overrun_err
);

  rx_state_t state;
  logic [1:0] sync;
  logic       rxd_s;
  logic [$clog2(WIDTH+1)-1:0] cnt;
  logic       in_shift;
  logic       in_so;
  logic       buf_shift;
  logic       full;

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end
  assign rxd_s = sync[1];

  assign in_shift  = ((state == RX_DATA) && baud_tick) || (state == RX_XFER);
  assign buf_shift = (state == RX_XFER);

  siso_reg #(.WIDTH(WIDTH)) u_in  (.clk, .rst, .shift(in_shift), .si(rxd_s), .so(in_so));
  sipo_reg #(.WIDTH(WIDTH)) u_buf (.clk, .rst, .shift(buf_shift), .si(in_so), .q(rdata));

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= RX_IDLE;
      cnt         <= '0;
      full        <= 1'b0;
      framing_err <= 1'b0;
      overrun_err <= 1'b0;
    end else begin
      framing_err <= 1'b0;
      overrun_err <= 1'b0;
      if (peri_rqt) full <= 1'b0;
      unique case (state)
        RX_IDLE: if (baud_tick && !en_n && !rxd_s) begin
          cnt   <= '0;
          state <= RX_DATA;
        end
        RX_DATA: if (baud_tick) begin
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(WIDTH+1))'(WIDTH - 1)) state <= RX_STOP;
        end
        RX_STOP: if (baud_tick) begin
          framing_err <= !rxd_s;
          cnt         <= '0;
          if (full && !peri_rqt) begin
            overrun_err <= 1'b1;
            state       <= RX_IDLE;
          end else begin
            state <= RX_XFER;
          end
        end
        RX_XFER: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(WIDTH+1))'(WIDTH - 1)) begin
            full  <= 1'b1;
            state <= RX_IDLE;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  assign rxfull = full;
  assign rxrdy  = full && !en_n;

  a_no_tick_in_xfer: assert property (@(posedge clk) disable iff (rst) (state == RX_XFER) |-> !baud_tick)
    else $error("uart_rx: baud period too short for the buffer transfer");

endmodule

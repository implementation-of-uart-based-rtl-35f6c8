// UART with built-in self test.
//
// An 8-bit UART (transmitter, receiver, read/write control logic, data bus
// buffer, status register, baud generator) wrapped by a self-test circuit: an
// LFSR test pattern generator, a test controller and a response analyzer.
// With enable low the UART serves the host (UART mode): the host writes a
// character with cd = 0 and wr_n, reads the received character with cd = 0
// and rd_n, and the status register with cd = 1. With enable high the test
// controller takes the transmitter and the receiver over (test mode): host
// writes are ignored, txd stays at 1, the receiver's input comes from the test
// circuit instead of rxd, and ack and en_bar are overridden. Each pseudo-random
// pattern goes serially into the receiver and in parallel into the
// transmitter, whose output is looped back to the receiver; the analyzer
// compares every received character with the pattern. bist_done and
// bist_pass report the outcome, fail_count the number of failed comparisons,
// fault_addr the first failing pattern's index and signature the compacted
// responses.
//
// Frames are 1 start bit, 8 data bits LSB first, 1 stop bit, one bit per
// DIVISOR clock cycles. Everything runs on clk with synchronous active-high
// reset. The block structure follows the design; the single clock with a
// baud-rate enable, the split host data bus and the register select cd are
// this design's.
module uart_bist_top
  import uart_pkg::*;
#(
  parameter int unsigned DIVISOR      = 16,
  parameter int unsigned NUM_PATTERNS = 255,
  parameter logic [7:0]  LFSR_POLY    = 8'h63,
  parameter logic [7:0]  LFSR_SEED    = 8'h01
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  // host bus
  input  logic        cs_n,
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic        cd,
  input  logic [7:0]  d_in,
  output logic [7:0]  d_out,
  output logic        d_oe,
  // serial side
  input  logic        rxd,
  output logic        txd,
  input  logic        ack,
  input  logic        en_bar,
  output logic        txrdy,
  output logic        txe,
  output logic        rxrdy,
  output logic        rxfull,
  // self-test result
  output logic        bist_done,
  output logic        bist_pass,
  output logic [15:0] fail_count,
  output logic [7:0]  fault_addr,
  output logic [7:0]  signature
);

  logic       tick;
  logic       wr_active, rd_active, rd_sel, wr_stb, rd_data_stb, rd_status_stb;
  logic [7:0] wdata;
  status_t    status;

  logic       tx_wr, tx_ack, txd_int;
  logic [7:0] tx_db;
  logic       rx_line, rx_en_n, rx_read, fe, oe;
  logic [7:0] rx_data;

  logic       tpg_clear, tpg_trig, ps, pp_load;
  logic [7:0] pp;
  logic       test_mode, test_rxd, bist_ack, bist_read;
  logic       ana_clear, check, miss;
  logic [7:0] expected, index;
  logic       fault_seen;

  baud_gen #(.DIVISOR(DIVISOR)) u_baud (.clk, .rst, .tick);

  rw_control u_rw (
    .clk, .rst, .cs_n, .rd_n, .wr_n, .cd,
    .wr_active, .rd_active, .rd_sel, .wr_stb, .rd_data_stb, .rd_status_stb
  );

  data_bus_buffer u_dbb (
    .clk, .rst, .d_in, .wr_active, .rd_active, .rd_sel,
    .rx_data, .status, .wdata, .d_out, .d_oe
  );

  // Mode multiplexers: in test mode the test circuit drives the UART.
  assign tx_wr   = test_mode ? pp_load   : wr_stb;
  assign tx_db   = test_mode ? pp        : wdata;
  assign tx_ack  = test_mode ? bist_ack  : ack;
  assign rx_line = test_mode ? test_rxd  : rxd;
  assign rx_en_n = test_mode ? 1'b0      : en_bar;
  assign rx_read = test_mode ? bist_read : rd_data_stb;
  assign txd     = test_mode ? 1'b1      : txd_int;

  uart_tx u_tx (
    .clk, .rst, .wr(tx_wr), .db(tx_db), .baud_tick(tick), .ack(tx_ack),
    .txd(txd_int), .txrdy, .txe
  );

  uart_rx u_rx (
    .clk, .rst, .rxd(rx_line), .baud_tick(tick), .en_n(rx_en_n), .peri_rqt(rx_read),
    .rdata(rx_data), .rxrdy, .rxfull, .framing_err(fe), .overrun_err(oe)
  );

  status_reg u_status (
    .clk, .rst, .rxrdy, .rxfull, .txrdy, .txe,
    .framing_err(fe && !test_mode), .overrun_err(oe && !test_mode),
    .bist_done, .bist_fail(bist_done && !bist_pass),
    .clear_err(rd_status_stb), .q(status)
  );

  lfsr_tpg #(.POLY(LFSR_POLY), .SEED(LFSR_SEED)) u_tpg (
    .clk, .rst, .clear(tpg_clear), .trig(tpg_trig), .ps, .pp, .pp_load
  );

  bist_controller #(.NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst, .enable, .tick,
    .ps, .pp, .pp_load, .tpg_clear, .tpg_trig,
    .txd_loop(txd_int), .tx_idle(txe), .rx_full(rxfull), .rx_fe(fe),
    .test_rxd, .tx_ack(bist_ack), .rx_read(bist_read),
    .ana_clear, .check, .miss, .expected, .index,
    .test_mode, .done(bist_done)
  );

  response_analyzer #(.POLY(LFSR_POLY)) u_ana (
    .clk, .rst, .clear(ana_clear), .check, .miss, .expected, .actual(rx_data), .index,
    .fail_count, .fault_addr, .fault_seen, .signature
  );

  assign bist_pass = bist_done && !fault_seen;

endmodule

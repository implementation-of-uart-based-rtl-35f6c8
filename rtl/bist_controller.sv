// Test controller of the self test.
//
// While enable is low the controller is idle and the UART works for the host
// (UART mode). When enable goes high it switches the UART into test mode,
// restarts the pattern generator and the analyzer, flushes the receive
// buffer, and then runs NUM_PATTERNS patterns. Each pattern is tested twice:
//  1. Receiver path. The controller puts a frame on the receiver's input: a
//     start bit, then the pattern generator's serial output ps, one bit per
//     baud tick (each tick is a trigger to the generator), then a stop bit.
//     When the receiver reports a character, it is compared with the pattern.
//  2. Transmitter path. After the eighth bit the generator passes the same
//     pattern in parallel to the transmitter (pp_load); the controller latches
//     it as the expected value, connects the transmitter's output to the
//     receiver's input and raises the transmitter's ack. The character that
//     comes back through the receiver is compared again.
// A response that does not arrive within TIMEOUT baud ticks, or that arrives
// with a framing error, is checked as missing. When all patterns are done,
// done rises and stays high until enable falls; dropping enable at any time
// aborts the test. Serial delivery to the receiver, parallel delivery to the
// transmitter and the two modes follow the design; the framing, the loopback
// of the transmitter, the timeout and the pattern count are this design's.
//
// Timing: one pattern takes about 23 baud periods.
module bist_controller
  import uart_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 255,
  parameter int unsigned TIMEOUT      = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       tick,
  // pattern generator
  input  logic       ps,
  input  logic [7:0] pp,
  input  logic       pp_load,
  output logic       tpg_clear,
  output logic       tpg_trig,
  // circuit under test
  input  logic       txd_loop,
  input  logic       tx_idle,
  input  logic       rx_full,
  input  logic       rx_fe,
  output logic       test_rxd,
  output logic       tx_ack,
  output logic       rx_read,
  // response analyzer
  output logic       ana_clear,
  output logic       check,
  output logic       miss,
  output logic [7:0] expected,
  output logic [7:0] index,
  // mode and result
  output logic       test_mode,
  output logic       done
);

  bist_state_t state;
  logic [2:0]  bitcnt;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;
  logic        tmo_hit;
  logic        fe_seen;
  logic        got;
  logic        last;

  assign tmo_hit = (tmo == ($clog2(TIMEOUT+1))'(TIMEOUT));
  assign got     = rx_full;
  assign last    = (index == 8'(NUM_PATTERNS - 1));

  always_comb begin
    tpg_clear = 1'b0;
    ana_clear = 1'b0;
    tpg_trig  = 1'b0;
    tx_ack    = 1'b0;
    rx_read   = 1'b0;
    check     = 1'b0;
    miss      = 1'b0;
    test_rxd  = 1'b1;
    unique case (state)
      B_IDLE:    if (enable) begin tpg_clear = 1'b1; ana_clear = 1'b1; rx_read = 1'b1; end
      B_ARM:     ;
      B_START:   test_rxd = 1'b0;
      B_DATA:    begin test_rxd = ps; tpg_trig = tick; end
      B_WAIT_RX: if (enable && (got || tmo_hit)) begin
                   check = 1'b1; miss = !got || fe_seen; rx_read = got;
                 end
      B_LOOP:    begin
                   test_rxd = txd_loop;
                   tx_ack   = 1'b1;
                   if (enable && (got || tmo_hit)) begin
                     check = 1'b1; miss = !got || fe_seen; rx_read = got;
                   end
                 end
      B_DONE:    ;
      default:   ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= B_IDLE;
      bitcnt   <= '0;
      tmo      <= '0;
      fe_seen  <= 1'b0;
      expected <= '0;
      index    <= '0;
    end else begin
      if (pp_load) expected <= pp;
      if (rx_fe) fe_seen <= 1'b1;
      if (tick && !tmo_hit) tmo <= tmo + 1'b1;
      if (!enable) begin
        state <= B_IDLE;
      end else begin
        unique case (state)
          B_IDLE: begin
            state   <= B_ARM;
            index   <= '0;
            tmo     <= '0;
            fe_seen <= 1'b0;
          end
          B_ARM:   if (tick && (tx_idle || tmo_hit)) state <= B_START;
          B_START: if (tick) begin bitcnt <= '0; state <= B_DATA; end
          B_DATA:  if (tick) begin
                     bitcnt <= bitcnt + 1'b1;
                     if (bitcnt == 3'd7) begin tmo <= '0; state <= B_WAIT_RX; end
                   end
          B_WAIT_RX: if (got || tmo_hit) begin
                     tmo <= '0; fe_seen <= 1'b0; state <= B_LOOP;
                   end
          B_LOOP:  if (got || tmo_hit) begin
                     tmo     <= '0;
                     fe_seen <= 1'b0;
                     if (last) state <= B_DONE;
                     else begin index <= index + 1'b1; state <= B_ARM; end
                   end
          B_DONE:  ;
          default: state <= B_IDLE;
        endcase
      end
    end
  end

  assign test_mode = (state != B_IDLE);
  assign done      = (state == B_DONE);

  initial assert (NUM_PATTERNS >= 1 && NUM_PATTERNS <= 256)
    else $error("bist_controller: NUM_PATTERNS must be 1..256");

endmodule

// Status register: what the host reads with cd = 1.
//
// The live flags (rxrdy, rxfull, txrdy, txe, BIST done and fail) are sampled
// every clock. The two error flags are sticky: a one-cycle framing_err or
// overrun_err pulse sets them, and they stay set until the host has read the
// status register (clear_err, given at the end of that read). A new error in
// the same cycle as the clear wins. The design calls for a status register
// that records transfer errors; which errors, the bit layout (uart_pkg's
// status_t) and the clear-on-read rule are this design's.
//
// Timing: q is registered, one cycle behind its inputs.
module status_reg
  import uart_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    rxrdy,
  input  logic    rxfull,
  input  logic    txrdy,
  input  logic    txe,
  input  logic    framing_err,
  input  logic    overrun_err,
  input  logic    bist_done,
  input  logic    bist_fail,
  input  logic    clear_err,
  output status_t q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else begin
      q.rxrdy       <= rxrdy;
      q.rxfull      <= rxfull;
      q.txrdy       <= txrdy;
      q.txe         <= txe;
      q.bist_done   <= bist_done;
      q.bist_fail   <= bist_fail;
      q.framing_err <= framing_err || (q.framing_err && !clear_err);
      q.overrun_err <= overrun_err || (q.overrun_err && !clear_err);
    end
  end

endmodule

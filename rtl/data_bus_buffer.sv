// Data bus buffer between the host's D7-D0 and the internal data bus.
//
// The bidirectional bus is split into d_in, d_out and an output enable d_oe,
// which a pad or the next level up turns into a three-state bus. During a
// write cycle (wr_active) d_in is latched every clock, so wdata holds the
// value present at the end of the cycle. During a read cycle d_out carries
// the received character (rd_sel = 0) or the status register (rd_sel = 1)
// and d_oe is high. The split bus and the registered outputs are this
// design's; the design only names the block.
//
// Timing: wdata, d_out and d_oe are registered, one cycle behind their inputs.
module data_bus_buffer
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] d_in,
  input  logic       wr_active,
  input  logic       rd_active,
  input  logic       rd_sel,
  input  logic [7:0] rx_data,
  input  status_t    status,
  output logic [7:0] wdata,
  output logic [7:0] d_out,
  output logic       d_oe
);

  always_ff @(posedge clk) begin
    if (rst) begin
      wdata <= '0;
      d_out <= '0;
      d_oe  <= 1'b0;
    end else begin
      if (wr_active) wdata <= d_in;
      d_oe  <= rd_active;
      d_out <= rd_active ? (rd_sel ? status : rx_data) : '0;
    end
  end

endmodule

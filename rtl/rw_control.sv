// Read/write control logic: turns the host's active-low bus strobes into
// single-cycle requests.
//
// A write cycle is cs_n and wr_n both low; a read cycle is cs_n and rd_n both
// low. cd, sampled as the cycle starts, selects the data register (0) or the
// status register (1). When a write cycle to the data register ends, wr_stb
// pulses for one clock; when a read cycle ends, rd_data_stb or rd_status_stb
// pulses, so the character or the error flags are released only after the
// host has taken them. wr_active and rd_active are high during the cycles
// themselves, and rd_sel is the register being read. The strobes are assumed
// synchronous to clk. The pins are the design's; the decoding and the
// end-of-cycle timing are this design's. Writes with cd = 1 are ignored (the
// design has no command register).
module rw_control (
  input  logic clk,
  input  logic rst,
  input  logic cs_n,
  input  logic rd_n,
  input  logic wr_n,
  input  logic cd,
  output logic wr_active,
  output logic rd_active,
  output logic rd_sel,
  output logic wr_stb,
  output logic rd_data_stb,
  output logic rd_status_stb
);

  logic wr_q, rd_q, cd_q;

  assign wr_active = !cs_n && !wr_n;
  assign rd_active = !cs_n && !rd_n;
  assign rd_sel    = rd_q ? cd_q : cd;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q <= 1'b0;
      rd_q <= 1'b0;
      cd_q <= 1'b0;
    end else begin
      wr_q <= wr_active;
      rd_q <= rd_active;
      if ((wr_active && !wr_q) || (rd_active && !rd_q)) cd_q <= cd;
    end
  end

  assign wr_stb        = wr_q && !wr_active && !cd_q;
  assign rd_data_stb   = rd_q && !rd_active && !cd_q;
  assign rd_status_stb = rd_q && !rd_active &&  cd_q;

endmodule

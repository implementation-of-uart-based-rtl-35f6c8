// Self-checking test of data_bus_buffer: wdata holds the last d_in of a write
// cycle, d_out shows the character or the status word during reads with d_oe
// high, and d_oe is low otherwise.
module tb_data_bus_buffer;
  import uart_pkg::*;
  logic clk = 0, rst = 1, wr_active = 0, rd_active = 0, rd_sel = 0;
  logic [7:0] d_in = 0, rx_data = 0, wdata, d_out;
  status_t status;
  logic d_oe;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  data_bus_buffer dut (.clk, .rst, .d_in, .wr_active, .rd_active, .rd_sel, .rx_data, .status,
                       .wdata, .d_out, .d_oe);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    status = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 50; i++) begin
      logic [7:0] a, b;
      a = 8'($urandom); b = 8'($urandom);
      wr_active = 1; d_in = ~a; @(posedge clk); #1;
      d_in = a; @(posedge clk); #1;
      wr_active = 0; d_in = b; @(posedge clk); #1;
      chk(wdata == a, "write data latched");
      chk(d_oe == 0, "bus not driven outside reads");
      rx_data = a; status = status_t'(b); rd_sel = i[0]; rd_active = 1;
      @(posedge clk); #1;
      chk(d_oe == 1, "bus driven during read");
      chk(d_out == (i[0] ? b : a), "read data");
      rd_active = 0; @(posedge clk); #1;
      chk(d_oe == 0, "released after read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

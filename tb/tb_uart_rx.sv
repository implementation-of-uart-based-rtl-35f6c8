// Self-checking test of uart_rx. The testbench sends frames on rxd, one bit
// per 16 clock cycles, changing the line right after each baud tick as the
// transmitter does. Checks: received byte, rxrdy/rxfull, a read (peri_rqt)
// empties the buffer, a 0 stop bit gives framing_err, a frame arriving while
// the buffer is full gives overrun_err and is dropped, and with en_n high
// nothing is received.
module tb_uart_rx;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, rxd = 1, baud_tick = 0, en_n = 0, peri_rqt = 0;
  logic [7:0] rdata;
  logic rxrdy, rxfull, framing_err, overrun_err;
  int checks = 0, failures = 0;
  int cnt = 0, n_fe = 0, n_oe = 0;
  always #5 clk = ~clk;

  uart_rx dut (.clk, .rst, .rxd, .baud_tick, .en_n, .peri_rqt, .rdata, .rxrdy, .rxfull, .framing_err, .overrun_err);

  always @(posedge clk) begin
    cnt <= (cnt == DIV - 1) ? 0 : cnt + 1;
    baud_tick <= (cnt == DIV - 1);
    if (!rst && framing_err) n_fe <= n_fe + 1;
    if (!rst && overrun_err) n_oe <= n_oe + 1;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic next_bit(input logic b);
    @(posedge clk iff baud_tick); #1 rxd = b;
  endtask

  task automatic send(input logic [7:0] w, input logic stop);
    next_bit(0);
    for (int i = 0; i < 8; i++) next_bit(w[i]);
    next_bit(stop);
    next_bit(1);
    repeat (12) @(posedge clk);
    #1;
  endtask

  task automatic read();
    peri_rqt = 1; @(posedge clk); #1; peri_rqt = 0;
    @(posedge clk); #1;
    chk(!rxrdy && !rxfull, "read empties the buffer");
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    repeat (3) @(posedge clk); #1;
    chk(!rxrdy && !rxfull, "empty after reset");
    for (int w = 0; w < 20; w++) begin
      logic [7:0] word;
      word = (w == 0) ? 8'h00 : (w == 1) ? 8'hFF : 8'($urandom);
      send(word, 1);
      chk(rxrdy && rxfull, "character ready");
      chk(rdata == word, $sformatf("sent %02h received %02h", word, rdata));
      read();
    end
    chk(n_fe == 0 && n_oe == 0, $sformatf("no errors on good frames (fe %0d oe %0d)", n_fe, n_oe));
    // framing error
    send(8'h3C, 0);
    chk(n_fe == 1, "framing error flagged");
    chk(rxrdy && rdata == 8'h3C, "character still delivered");
    // overrun: buffer not read, next frame dropped
    send(8'h99, 1);
    chk(n_oe == 1, "overrun flagged");
    chk(rdata == 8'h3C, "first character kept");
    read();
    // receiver disabled
    en_n = 1;
    send(8'h5A, 1);
    chk(!rxrdy && !rxfull, "nothing received while disabled");
    en_n = 0;
    send(8'hA5, 1);
    chk(rxrdy && rdata == 8'hA5, "receives again when enabled");
    // rxrdy is masked while disabled, rxfull is not
    en_n = 1; #1;
    chk(!rxrdy && rxfull, "rxrdy masked by en_n");
    en_n = 0;
    read();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

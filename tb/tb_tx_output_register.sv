// Self-checking test of tx_output_register. The testbench plays the buffer
// (8 serial bits, then buf_empty) and the baud generator (a tick every 16
// cycles), then decodes txd: start bit, 8 data bits LSB first, stop bit, each
// exactly 16 cycles long, the start bit beginning right after a tick. It also
// checks that ack low delays the frame and the txe / op_reg_empty flags.
module tb_tx_output_register;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, ip = 0, ip_shift = 0, buf_empty = 1, baud_tick = 0, ack = 1;
  logic txd, txe, op_reg_empty;
  int checks = 0, failures = 0;
  int cnt = 0;
  always #5 clk = ~clk;

  tx_output_register dut (.clk, .rst, .ip, .ip_shift, .buf_empty, .baud_tick, .ack, .txd, .txe, .op_reg_empty);

  always @(posedge clk) begin
    cnt <= (cnt == DIV - 1) ? 0 : cnt + 1;
    baud_tick <= (cnt == DIV - 1);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic fill(input logic [7:0] w);
    buf_empty = 0;
    for (int i = 0; i < 8; i++) begin
      chk(op_reg_empty == 1, "accepts bits while filling");
      ip = w[i]; ip_shift = 1; @(posedge clk); #1;
    end
    ip_shift = 0; buf_empty = 1;
    @(posedge clk); #1;
    chk(op_reg_empty == 0 && txe == 0, "full after fill");
  endtask

  // waits for the start bit and checks the whole frame at the bit centres
  task automatic expect_frame(input logic [7:0] w);
    int t = 0;
    while (txd == 1 && t < 40 * DIV) begin @(posedge clk); #1; t++; end
    chk(txd == 0, "start bit seen");
    chk(cnt == 1, $sformatf("start bit right after a tick (phase %0d)", cnt));
    for (int k = 0; k < DIV; k++) begin
      if (txd != 0) begin chk(0, $sformatf("start bit cut at %0d cycles", k)); break; end
      @(posedge clk); #1;
    end
    for (int i = 0; i < 8; i++) begin
      repeat (DIV / 2) @(posedge clk);
      #1 chk(txd == w[i], $sformatf("data bit %0d of %02h", i, w));
      repeat (DIV / 2) @(posedge clk);
      #1;
    end
    repeat (DIV / 2) @(posedge clk);
    #1 chk(txd == 1, "stop bit");
    repeat (DIV / 2 + 1) @(posedge clk);
    #1 chk(txe == 1 && op_reg_empty == 1, "empty after stop bit");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    @(posedge clk); #1;
    chk(txd == 1 && txe == 1, "idle line high, empty");
    for (int w = 0; w < 12; w++) begin
      logic [7:0] word;
      word = (w == 0) ? 8'h00 : (w == 1) ? 8'hFF : 8'($urandom);
      if (w == 3) begin
        ack = 0;
        fill(word);
        repeat (5 * DIV) @(posedge clk); #1;
        chk(txd == 1 && txe == 0, "no frame without ack");
        ack = 1;
      end else begin
        fill(word);
      end
      expect_frame(word);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

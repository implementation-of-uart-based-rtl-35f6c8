// Self-checking test of uart_tx: bytes written on the parallel side appear as
// frames on txd (start, 8 bits LSB first, stop; 16 clock cycles per bit).
// A second byte written while the first is on the line must follow it; txrdy
// and txe are checked along the way, and ack low must hold a frame back.
module tb_uart_tx;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, wr = 0, baud_tick = 0, ack = 1;
  logic [7:0] db = 0;
  logic txd, txrdy, txe;
  int checks = 0, failures = 0;
  int cnt = 0;
  logic [7:0] sent [$];
  int nframes = 0;
  always #5 clk = ~clk;

  uart_tx dut (.clk, .rst, .wr, .db, .baud_tick, .ack, .txd, .txrdy, .txe);

  always @(posedge clk) begin
    cnt <= (cnt == DIV - 1) ? 0 : cnt + 1;
    baud_tick <= (cnt == DIV - 1);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // independent line monitor: samples each bit in its centre
  initial begin
    forever begin
      logic [7:0] w;
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      #2;
      if (txd == 0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          #2 w[i] = txd;
        end
        repeat (DIV) @(posedge clk);
        #2 chk(txd == 1, "stop bit");
        if (sent.size() == 0) chk(0, "frame nobody wrote");
        else chk(w == sent.pop_front(), $sformatf("frame %02h", w));
        nframes++;
      end
    end
  end

  task automatic write(input logic [7:0] w);
    int t = 0;
    while (!txrdy && t < 100 * DIV) begin @(posedge clk); #1; t++; end
    chk(txrdy, "txrdy before write");
    sent.push_back(w);
    db = w; wr = 1; @(posedge clk); #1; wr = 0;
    chk(!txrdy && !txe, "busy after write");
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    @(posedge clk); #1;
    chk(txrdy && txe && txd, "idle after reset");
    // back to back: the second byte is queued while the first is sent
    write(8'h55);
    write(8'hA3);
    write(8'h0F);
    t = 0;
    while (!txe && t < 100 * DIV) begin @(posedge clk); #1; t++; end
    // ack low holds the frame
    ack = 0;
    write(8'hC6);
    repeat (15 * DIV) @(posedge clk); #1;
    chk(txd == 1 && nframes == 3, "ack low holds the frame");
    ack = 1;
    for (int i = 0; i < 10; i++) write(8'($urandom));
    t = 0;
    while ((!txe || sent.size() != 0) && t < 200 * DIV) begin @(posedge clk); #1; t++; end
    repeat (2 * DIV) @(posedge clk);
    chk(nframes == 14, $sformatf("%0d frames", nframes));
    chk(txe && txrdy, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

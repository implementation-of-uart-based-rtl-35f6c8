// End-to-end test of uart_bist_top at its default parameters (16 clock cycles
// per bit, 255 test patterns).
//
// UART mode: host writes go out on txd as frames (checked by an independent
// line monitor), frames driven on rxd are read back over the host bus, the
// status register shows framing and overrun errors and clears them when read,
// ack low holds a frame, en_bar high ignores the line. Test mode: the full
// self test runs and passes, the signature matches an independent model, txd
// stays idle and host writes are ignored; with the receiver's line forced
// stuck at 1 the self test reports every check as failed. Every mechanism is
// counted, and one that never happened is a failure.
module tb_uart_bist_top;
  import uart_pkg::*;
  localparam int DIV = 16;     // the top's default
  localparam int NPAT = 255;   // the top's default
  logic clk = 0, rst = 1, enable = 0;
  logic cs_n = 1, rd_n = 1, wr_n = 1, cd = 0;
  logic [7:0] d_in = 0, d_out;
  logic d_oe, rxd = 1, txd, ack = 1, en_bar = 0;
  logic txrdy, txe, rxrdy, rxfull, bist_done, bist_pass;
  logic [15:0] fail_count;
  logic [7:0] fault_addr, signature;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int nframes = 0;
  // mechanism counters
  int m_tx = 0, m_rx = 0, m_fe = 0, m_oe = 0, m_clr = 0, m_ack = 0, m_enbar = 0;
  int m_bist_pass = 0, m_bist_fault = 0, m_ignored = 0, m_queue = 0;
  always #5 clk = ~clk;

  uart_bist_top dut (.clk, .rst, .enable, .cs_n, .rd_n, .wr_n, .cd, .d_in, .d_out, .d_oe,
                     .rxd, .txd, .ack, .en_bar, .txrdy, .txe, .rxrdy, .rxfull,
                     .bist_done, .bist_pass, .fail_count, .fault_addr, .signature);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] times_x(input logic [7:0] s);
    logic [8:0] t;
    t = {s, 1'b0};
    if (t[8]) t = t ^ 9'h163;
    return t[7:0];
  endfunction

  // txd line monitor
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
        #2 chk(txd == 1, "stop bit on txd");
        if (sent.size() == 0) chk(0, $sformatf("unexpected frame %02h", w));
        else chk(w == sent.pop_front(), $sformatf("frame %02h on txd", w));
        nframes++;
      end
    end
  end

  task automatic host_write(input logic [7:0] w);
    cs_n = 0; cd = 0; d_in = w; wr_n = 0;
    repeat (2) @(posedge clk);
    #1 wr_n = 1; cs_n = 1;
    repeat (2) @(posedge clk);
    #1;
  endtask

  task automatic host_read(input logic sel, output logic [7:0] v);
    cs_n = 0; cd = sel; rd_n = 0;
    repeat (2) @(posedge clk);
    #1 chk(d_oe, "bus driven during read");
    v = d_out;
    rd_n = 1; cs_n = 1;
    repeat (2) @(posedge clk);
    #1 chk(!d_oe, "bus released");
  endtask

  task automatic send_rx(input logic [7:0] w, input logic stop);
    rxd = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = w[i]; repeat (DIV) @(posedge clk); end
    rxd = stop; repeat (DIV) @(posedge clk);
    rxd = 1; repeat (DIV) @(posedge clk);
    #1;
  endtask

  task automatic wait_cycles_until(ref logic sig, input int limit, output bit ok);
    int t = 0;
    while (!sig && t < limit) begin @(posedge clk); #1; t++; end
    ok = sig;
  endtask

  task automatic tx_char(input logic [7:0] w);
    bit ok;
    wait_cycles_until(txrdy, 40 * DIV, ok);
    chk(ok, "txrdy");
    sent.push_back(w);
    host_write(w);
  endtask

  task automatic drain();
    int t = 0;
    while ((sent.size() != 0 || !txe) && t < 100 * DIV) begin @(posedge clk); #1; t++; end
    repeat (2 * DIV) @(posedge clk);
    #1 chk(sent.size() == 0, "all written characters sent");
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] v;
    status_t st;
    bit ok;
    int n, cycles;
    logic [7:0] sig, m;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (3) @(posedge clk); #1;
    host_read(1, v); st = status_t'(v);
    chk(st.txrdy && st.txe && !st.rxrdy && !st.framing_err, "status after reset");

    // ---- UART mode: transmit
    for (int i = 0; i < 6; i++) begin
      n = nframes;
      tx_char(8'($urandom));
      if (i > 0 && nframes == n && !txe) m_queue++;  // written while the line was busy
    end
    drain();
    m_tx = nframes;
    chk(nframes == 6, $sformatf("%0d frames sent", nframes));

    // ack low holds the frame
    ack = 0; n = nframes;
    tx_char(8'h81);
    repeat (20 * DIV) @(posedge clk); #1;
    chk(nframes == n && txd == 1, "ack low holds the frame");
    if (nframes == n) m_ack++;
    ack = 1;
    drain();

    // ---- UART mode: receive
    for (int i = 0; i < 8; i++) begin
      logic [7:0] w;
      w = 8'($urandom);
      repeat ($urandom % DIV) @(posedge clk);  // arbitrary phase against the bit clock
      send_rx(w, 1);
      wait_cycles_until(rxrdy, 4 * DIV, ok);
      chk(ok, "rxrdy");
      host_read(0, v);
      chk(v == w, $sformatf("received %02h, sent %02h", v, w));
      if (v == w) m_rx++;
      chk(!rxrdy, "read empties the receiver");
    end

    // framing error, sticky until the status is read
    send_rx(8'h42, 0);
    host_read(1, v); st = status_t'(v);
    chk(st.framing_err && st.rxrdy, "framing error in status");
    if (st.framing_err) m_fe++;
    host_read(1, v); st = status_t'(v);
    chk(!st.framing_err, "framing error cleared by status read");
    if (!st.framing_err) m_clr++;
    host_read(0, v);
    chk(v == 8'h42, "character with framing error delivered");

    // overrun
    send_rx(8'h11, 1);
    send_rx(8'h22, 1);
    host_read(1, v); st = status_t'(v);
    chk(st.overrun_err, "overrun in status");
    if (st.overrun_err) m_oe++;
    host_read(0, v);
    chk(v == 8'h11, "first character kept on overrun");

    // receiver disabled
    en_bar = 1;
    send_rx(8'h77, 1);
    repeat (2 * DIV) @(posedge clk); #1;
    chk(!rxrdy && !rxfull, "nothing received with en_bar high");
    if (!rxfull) m_enbar++;
    en_bar = 0;

    // ---- test mode, fault free, default size
    sig = 0; m = 8'h01;
    for (int p = 0; p < NPAT; p++) begin
      sig = times_x(sig) ^ m;
      sig = times_x(sig) ^ m;
      m = times_x(m);
    end
    enable = 1;
    repeat (20) @(posedge clk);
    host_write(8'hEE);          // must be ignored in test mode
    cycles = 0;
    while (!bist_done && cycles < NPAT * 30 * DIV) begin
      @(posedge clk); #1; cycles++;
      if (txd != 1) begin chk(0, "txd idle in test mode"); break; end
    end
    chk(bist_done && bist_pass, "self test passes");
    chk(fail_count == 0, $sformatf("%0d failures in fault-free self test", fail_count));
    chk(signature == sig, $sformatf("signature %02h, model %02h", signature, sig));
    chk(cycles <= NPAT * 25 * DIV, $sformatf("self test took %0d cycles", cycles));
    $display("self test: %0d patterns in %0d clock cycles", NPAT, cycles);
    if (bist_done && bist_pass) m_bist_pass++;
    host_read(1, v); st = status_t'(v);
    chk(st.bist_done && !st.bist_fail, "status shows test passed");
    enable = 0;
    repeat (3 * DIV) @(posedge clk); #1;
    chk(nframes == 7 && txe, "host write during test mode ignored");
    if (nframes == 7) m_ignored++;

    // ---- test mode with the receiver's line stuck at 1
    force dut.rx_line = 1'b1;
    enable = 1;
    cycles = 0;
    while (!bist_done && cycles < NPAT * 100 * DIV) begin @(posedge clk); #1; cycles++; end
    chk(bist_done && !bist_pass, "stuck line detected");
    chk(fail_count == 16'(2 * NPAT), $sformatf("%0d failures with stuck line", fail_count));
    chk(fault_addr == 0, "first failing pattern is 0");
    if (bist_done && !bist_pass) m_bist_fault++;
    host_read(1, v); st = status_t'(v);
    chk(st.bist_done && st.bist_fail, "status shows test failed");
    enable = 0;
    release dut.rx_line;
    repeat (4 * DIV) @(posedge clk); #1;

    // ---- back in UART mode
    drain();
    sent = {};
    nframes = 0;
    tx_char(8'h3C);
    drain();
    chk(nframes == 1, "transmits after self test");
    send_rx(8'hC3, 1);
    host_read(0, v);
    chk(v == 8'hC3, "receives after self test");

    chk(m_tx > 0, "mechanism: transmit");
    chk(m_queue > 0, "mechanism: character queued behind a busy line");
    chk(m_rx > 0, "mechanism: receive");
    chk(m_fe > 0, "mechanism: framing error");
    chk(m_clr > 0, "mechanism: error clear on status read");
    chk(m_oe > 0, "mechanism: overrun");
    chk(m_ack > 0, "mechanism: ack hold");
    chk(m_enbar > 0, "mechanism: receiver disable");
    chk(m_bist_pass > 0, "mechanism: self test pass");
    chk(m_bist_fault > 0, "mechanism: self test fault detection");
    chk(m_ignored > 0, "mechanism: host write ignored in test mode");
    $display("mechanisms: tx %0d queue %0d rx %0d fe %0d clr %0d oe %0d ack %0d en_bar %0d bist_pass %0d bist_fault %0d ignored %0d",
             m_tx, m_queue, m_rx, m_fe, m_clr, m_oe, m_ack, m_enbar, m_bist_pass, m_bist_fault, m_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

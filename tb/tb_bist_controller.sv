// Self-checking test of bist_controller, run with the real pattern generator,
// transmitter, receiver, analyzer and baud generator around it (the same
// wiring as the top level's test mode). Three runs of NUM patterns:
//  1. fault-free: done, no failures, 2 checks and 8 triggers per pattern,
//     and the expected values follow the LFSR sequence;
//  2. a stuck-at-0 fault on bit 3 of the received character: the failures
//     must be exactly the checks whose pattern has bit 3 set, and the first
//     failing index must be the first such pattern;
//  3. the transmitter never gets ack: every loopback check must time out as
//     missing, and the test must still finish.
// Dropping enable must return the controller to idle.
module tb_bist_controller;
  import uart_pkg::*;
  localparam int DIV = 16;
  localparam int NUM = 12;
  logic clk = 0, rst = 1, enable = 0;
  logic tick, ps, pp_load, tpg_clear, tpg_trig;
  logic [7:0] pp, expected, index, rx_data;
  logic txd, txrdy, txe, rxrdy, rxfull, fe, oe;
  logic test_rxd, tx_ack, rx_read, ana_clear, check, miss, test_mode, done;
  logic [15:0] fail_count;
  logic [7:0] fault_addr, signature;
  logic fault_seen;
  logic stuck3 = 0, kill_tx = 0;
  int checks = 0, failures = 0;
  int n_check = 0, n_trig = 0, n_miss = 0;
  logic [7:0] exp_seen [$];
  always #5 clk = ~clk;

  baud_gen #(.DIVISOR(DIV)) u_baud (.clk, .rst, .tick);
  lfsr_tpg u_tpg (.clk, .rst, .clear(tpg_clear), .trig(tpg_trig), .ps, .pp, .pp_load);
  uart_tx u_tx (.clk, .rst, .wr(pp_load), .db(pp), .baud_tick(tick), .ack(tx_ack && !kill_tx),
                .txd, .txrdy, .txe);
  uart_rx u_rx (.clk, .rst, .rxd(test_rxd), .baud_tick(tick), .en_n(1'b0), .peri_rqt(rx_read),
                .rdata(rx_data), .rxrdy, .rxfull, .framing_err(fe), .overrun_err(oe));
  bist_controller #(.NUM_PATTERNS(NUM)) dut (
    .clk, .rst, .enable, .tick, .ps, .pp, .pp_load, .tpg_clear, .tpg_trig,
    .txd_loop(txd), .tx_idle(txe), .rx_full(rxfull), .rx_fe(fe),
    .test_rxd, .tx_ack, .rx_read, .ana_clear, .check, .miss, .expected, .index,
    .test_mode, .done);
  response_analyzer u_ana (.clk, .rst, .clear(ana_clear), .check, .miss, .expected,
                           .actual(stuck3 ? (rx_data & 8'hF7) : rx_data), .index,
                           .fail_count, .fault_addr, .fault_seen, .signature);

  always @(posedge clk) if (!rst) begin
    if (check) begin n_check++; exp_seen.push_back(expected); if (miss) n_miss++; end
    if (tpg_trig) n_trig++;
  end

  function automatic logic [7:0] times_x(input logic [7:0] s);
    logic [8:0] t;
    t = {s, 1'b0};
    if (t[8]) t = t ^ 9'h163;
    return t[7:0];
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_test(output int cycles);
    n_check = 0; n_trig = 0; n_miss = 0; exp_seen = {};
    enable = 1;
    cycles = 0;
    while (!done && cycles < NUM * 100 * DIV) begin @(posedge clk); #1; cycles++; end
    chk(done, "test finished");
    chk(test_mode, "test mode while enabled");
  endtask

  initial begin
    repeat (NUM * 400 * DIV) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cycles, want, first;
    logic [7:0] m;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (5) @(posedge clk); #1;
    chk(!test_mode && !done, "idle while enable is low");

    // 1. fault-free
    run_test(cycles);
    chk(fail_count == 0 && !fault_seen, $sformatf("fault-free run: %0d failures", fail_count));
    chk(n_check == 2 * NUM, $sformatf("%0d checks", n_check));
    chk(n_trig == 8 * NUM, $sformatf("%0d triggers", n_trig));
    chk(cycles <= NUM * 25 * DIV, $sformatf("took %0d cycles", cycles));
    m = 8'h01;
    for (int p = 0; p < NUM; p++) begin
      chk(exp_seen.size() >= 2 && exp_seen[0] == m && exp_seen[1] == m,
          $sformatf("pattern %0d expected value", p));
      if (exp_seen.size() >= 2) begin void'(exp_seen.pop_front()); void'(exp_seen.pop_front()); end
      m = times_x(m);
    end
    enable = 0; @(posedge clk); #1;
    chk(!test_mode && !done, "back to idle");
    repeat (3 * DIV) @(posedge clk); #1;

    // 2. stuck-at-0 on received bit 3
    stuck3 = 1;
    run_test(cycles);
    want = 0; first = -1; m = 8'h01;
    for (int p = 0; p < NUM; p++) begin
      if (m[3]) begin want += 2; if (first < 0) first = p; end
      m = times_x(m);
    end
    chk(fail_count == 16'(want), $sformatf("stuck-at run: %0d failures, want %0d", fail_count, want));
    chk(fault_seen && fault_addr == 8'(first), $sformatf("first fault at %0d, want %0d", fault_addr, first));
    stuck3 = 0;
    enable = 0; repeat (3 * DIV) @(posedge clk); #1;

    // 3. transmitter never sends
    kill_tx = 1;
    run_test(cycles);
    chk(n_miss == NUM && fail_count == 16'(NUM), $sformatf("dead transmitter: %0d misses, %0d failures", n_miss, fail_count));
    kill_tx = 0;
    enable = 0; @(posedge clk); #1;
    chk(!test_mode, "idle after abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

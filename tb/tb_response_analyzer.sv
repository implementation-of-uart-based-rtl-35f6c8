// Self-checking test of response_analyzer: failures counted for mismatches and
// misses only, the first failing index kept, and the signature equal to an
// independently computed MISR over all checked responses.
module tb_response_analyzer;
  logic clk = 0, rst = 1, clear = 0, check = 0, miss = 0;
  logic [7:0] expected = 0, actual = 0, index = 0;
  logic [15:0] fail_count;
  logic [7:0] fault_addr, signature;
  logic fault_seen;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  response_analyzer dut (.clk, .rst, .clear, .check, .miss, .expected, .actual, .index,
                         .fail_count, .fault_addr, .fault_seen, .signature);

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

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nfail, first;
    logic [7:0] sig;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int run = 0; run < 2; run++) begin
      clear = 1; @(posedge clk); #1; clear = 0;
      chk(fail_count == 0 && !fault_seen && signature == 0, "cleared");
      nfail = 0; first = -1; sig = 0;
      for (int i = 0; i < 100; i++) begin
        bit bad, m;
        expected = 8'($urandom);
        bad = (run == 1) && ($urandom % 10 == 0);
        m   = (run == 1) && ($urandom % 25 == 0);
        actual = bad ? expected ^ (8'h1 << ($urandom % 8)) : expected;
        miss = m; index = 8'(i);
        check = 1; @(posedge clk); #1; check = 0; miss = 0;
        if (bad || m) begin nfail++; if (first < 0) first = i; end
        sig = times_x(sig) ^ actual;
        chk(fail_count == 16'(nfail), $sformatf("fail count %0d vs %0d", fail_count, nfail));
        chk(signature == sig, "signature");
        // idle cycles change nothing
        actual = ~actual; @(posedge clk); #1;
        chk(signature == sig && fail_count == 16'(nfail), "no change without check");
      end
      chk(fault_seen == (first >= 0), "fault_seen");
      if (first >= 0) chk(fault_addr == 8'(first), $sformatf("first fault %0d vs %0d", fault_addr, first));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

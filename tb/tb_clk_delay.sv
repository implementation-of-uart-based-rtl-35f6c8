// Self-checking test of clk_delay: q equals d of the previous cycle.
module tb_clk_delay;
  logic clk = 0, rst = 1, d = 0, q;
  logic prev;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clk_delay dut (.clk, .rst, .d, .q);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    chk(q == 0, "reset");
    rst = 0;
    for (int i = 0; i < 100; i++) begin
      prev = 1'($urandom);
      d = prev; @(posedge clk); #1;
      chk(q == prev, $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

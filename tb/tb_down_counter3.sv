// Self-checking test of down_counter3: counts 7 down to 0 on triggers, tc on
// every eighth trigger only, wraps, clear restarts at 7.
module tb_down_counter3;
  logic clk = 0, rst = 1, clear = 0, trig = 0;
  logic [2:0] count;
  logic tc;
  int checks = 0, failures = 0;
  int ntrig = 0;
  always #5 clk = ~clk;

  down_counter3 dut (.clk, .rst, .clear, .trig, .count, .tc);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    chk(count == 7, "starts at 7");
    for (int i = 0; i < 40; i++) begin
      trig = 1; #1;
      chk(tc == (ntrig % 8 == 7), $sformatf("tc at trigger %0d", ntrig));
      @(posedge clk); #1; trig = 0; ntrig++;
      chk(count == 3'(7 - (ntrig % 8)), $sformatf("count after %0d triggers", ntrig));
      #1 chk(tc == 0, "no tc without trigger");
      @(posedge clk); #1;
    end
    trig = 1; @(posedge clk); #1; trig = 0;
    clear = 1; @(posedge clk); #1; clear = 0;
    chk(count == 7, "clear restarts at 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

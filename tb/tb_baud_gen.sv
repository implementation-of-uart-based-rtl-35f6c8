// Self-checking test of baud_gen: one tick every DIVISOR cycles, each one
// cycle long.
module tb_baud_gen;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  int last = -1, cyc = 0, nticks = 0;
  always #5 clk = ~clk;

  baud_gen #(.DIVISOR(DIV)) dut (.clk, .rst, .tick);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    while (nticks < 50) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        if (last >= 0) chk(cyc - last == DIV, $sformatf("tick spacing %0d", cyc - last));
        last = cyc; nticks++;
      end
    end
    chk(nticks == 50, "ticks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

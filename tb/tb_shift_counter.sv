// Self-checking test of shift_counter: op after exactly WIDTH shifts, load
// restarts, shifts after op are ignored, reset state.
module tb_shift_counter;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [3:0] count;
  logic op;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  shift_counter #(.WIDTH(8)) dut (.clk, .rst, .load, .shift, .count, .op);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    chk(op == 1, "op high after reset");
    for (int trial = 0; trial < 3; trial++) begin
      load = 1; @(posedge clk); #1; load = 0;
      chk(op == 0 && count == 0, "load clears op and count");
      for (int i = 1; i <= 8; i++) begin
        // idle cycle between shifts must not count
        if (trial == 1) begin @(posedge clk); #1; end
        shift = 1; @(posedge clk); #1; shift = 0;
        chk(count == 4'(i), $sformatf("count %0d after %0d shifts", count, i));
        chk(op == (i == 8), $sformatf("op=%0d after %0d shifts", op, i));
      end
      shift = 1; @(posedge clk); #1; shift = 0;
      chk(op == 1 && count == 8, "extra shift ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

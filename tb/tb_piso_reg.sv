// Self-checking test of piso_reg: parallel load, LSB-first serial output,
// hold while sel = 1, rotation back to the loaded word after 8 shifts.
module tb_piso_reg;
  logic clk = 0, rst = 1, reg_load = 0, sel = 0, shift = 0;
  logic [7:0] d, pp;
  logic ps;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  piso_reg #(.WIDTH(8), .RESET_VAL(8'hA5)) dut (.clk, .rst, .reg_load, .sel, .shift, .d, .ps, .pp);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = 0;
    repeat (2) @(posedge clk); #1;
    chk(pp == 8'hA5, "reset value");
    rst = 0;
    for (int w = 0; w < 20; w++) begin
      logic [7:0] word;
      word = 8'($urandom);
      d = word; reg_load = 1; @(posedge clk); #1; reg_load = 0;
      chk(pp == word, "parallel load");
      for (int i = 0; i < 8; i++) begin
        chk(ps == word[i], $sformatf("serial bit %0d of %02h", i, word));
        // hold for a cycle with sel = 1: nothing may move
        sel = 1; shift = 1; @(posedge clk); #1;
        chk(ps == word[i], "hold with sel=1");
        sel = 0; shift = 1; @(posedge clk); #1; shift = 0;
      end
      chk(pp == word, "rotated back after 8 shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Self-checking test of siso_reg: a bit shifted in appears at the output
// after exactly 8 shifts; idle cycles do not move the chain.
module tb_siso_reg;
  logic clk = 0, rst = 1, shift = 0, si = 0, so;
  int checks = 0, failures = 0;
  logic [63:0] stream;
  always #5 clk = ~clk;

  siso_reg #(.WIDTH(8)) dut (.clk, .rst, .shift, .si, .so);

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
    stream = {$urandom, $urandom};
    repeat (2) @(posedge clk); #1;
    rst = 0;
    chk(so == 0, "cleared by reset");
    for (int i = 0; i < 64; i++) begin
      si = stream[i]; shift = 1; @(posedge clk); #1; shift = 0;
      if (i >= 7) chk(so == stream[i-7], $sformatf("bit %0d out after 8 shifts", i - 7));
      if (i % 3 == 0) begin
        logic prev_so;
        prev_so = so;
        si = ~si; @(posedge clk); #1;
        chk(so == prev_so, "no shift, no change");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Self-checking test of sipo_reg: 8 bits shifted in LSB first appear as the
// parallel word; idle cycles hold.
module tb_sipo_reg;
  logic clk = 0, rst = 1, shift = 0, si = 0;
  logic [7:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sipo_reg #(.WIDTH(8)) dut (.clk, .rst, .shift, .si, .q);

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
    repeat (2) @(posedge clk); #1;
    rst = 0;
    chk(q == 0, "cleared by reset");
    for (int w = 0; w < 20; w++) begin
      logic [7:0] word;
      word = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        si = word[i]; shift = 1; @(posedge clk); #1; shift = 0;
        if (w % 2 == 1) begin si = 1'($urandom); @(posedge clk); #1; end
      end
      chk(q == word, $sformatf("word %02h received as %02h", word, q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

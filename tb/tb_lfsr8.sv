// Self-checking test of lfsr8 with the default polynomial
// x^8 + x^6 + x^5 + x + 1: every step must equal x * state mod p(x), the
// sequence from seed 01 must visit all 255 nonzero states once, en low must
// hold, and clear must return to the seed.
module tb_lfsr8;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic [7:0] q;
  int checks = 0, failures = 0;
  bit seen [256];
  always #5 clk = ~clk;

  lfsr8 dut (.clk, .rst, .clear, .en, .q);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // multiply by x modulo x^8+x^6+x^5+x+1 (0x163)
  function automatic logic [7:0] times_x(input logic [7:0] s);
    logic [8:0] t;
    t = {s, 1'b0};
    if (t[8]) t = t ^ 9'h163;
    return t[7:0];
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] model;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    chk(q == 8'h01, "seed after reset");
    model = 8'h01;
    for (int i = 0; i < 255; i++) begin
      chk(!seen[q], $sformatf("state %02h repeats early at step %0d", q, i));
      seen[q] = 1;
      en = 1; @(posedge clk); #1; en = 0;
      model = times_x(model);
      if (i < 40 || i % 16 == 0) chk(q == model, $sformatf("step %0d: %02h vs model %02h", i, q, model));
    end
    chk(q == 8'h01, "period is 255");
    @(posedge clk); #1;
    chk(q == 8'h01, "holds with en low");
    en = 1; repeat (5) @(posedge clk); #1; en = 0;
    clear = 1; @(posedge clk); #1; clear = 0;
    chk(q == 8'h01, "clear reloads seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Self-checking test of tx_buffer. The testbench plays the output register:
// it collects buf_op on every buf_shift and sometimes reports itself busy.
// Checks: the 8 collected bits equal the written byte (LSB first), exactly 8
// shift strobes per byte, no shifting while op_reg_empty is low, tx_rdy low
// from the write until the 8th shift and high afterwards.
module tb_tx_buffer;
  logic clk = 0, rst = 1, wr = 0, op_reg_empty = 1;
  logic [7:0] db = 0;
  logic tx_rdy, buf_op, buf_shift;
  int checks = 0, failures = 0;
  logic [7:0] got;
  int nshift;
  always #5 clk = ~clk;

  tx_buffer dut (.clk, .rst, .wr, .db, .op_reg_empty, .tx_rdy, .buf_op, .buf_shift);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && buf_shift) begin
    got    <= {buf_op, got[7:1]};
    nshift <= nshift + 1;
    if (!op_reg_empty) begin failures++; $display("FAIL: shift while output register busy"); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    chk(tx_rdy == 1, "empty after reset");
    for (int w = 0; w < 30; w++) begin
      logic [7:0] word;
      int cycles;
      word = 8'($urandom);
      op_reg_empty = (w % 3 != 0);
      nshift = 0;
      db = word; wr = 1; @(posedge clk); #1; wr = 0; db = ~word;
      chk(tx_rdy == 0, "full after write");
      cycles = 0;
      if (!op_reg_empty) begin
        repeat (5) @(posedge clk); #1;
        chk(nshift == 0 && tx_rdy == 0, "held while output register busy");
        op_reg_empty = 1;
      end
      while (!tx_rdy && cycles < 50) begin @(posedge clk); #1; cycles++; end
      chk(cycles == 8, $sformatf("drained in %0d cycles", cycles));
      chk(nshift == 8, $sformatf("%0d shift strobes", nshift));
      chk(got == word, $sformatf("sent %02h, collected %02h", word, got));
      repeat (w % 2) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

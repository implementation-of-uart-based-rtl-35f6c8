// Self-checking test of status_reg: live flags follow their inputs one cycle
// later, error flags are sticky until clear_err, and a new error beats a
// clear in the same cycle.
module tb_status_reg;
  import uart_pkg::*;
  logic clk = 0, rst = 1;
  logic rxrdy = 0, rxfull = 0, txrdy = 0, txe = 0, fe = 0, oe = 0, bd = 0, bf = 0, clr = 0;
  status_t q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  status_reg dut (.clk, .rst, .rxrdy, .rxfull, .txrdy, .txe, .framing_err(fe), .overrun_err(oe),
                  .bist_done(bd), .bist_fail(bf), .clear_err(clr), .q);

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
    chk(q == 8'h00, "reset");
    rst = 0;
    for (int i = 0; i < 50; i++) begin
      logic [5:0] v;
      v = 6'($urandom);
      {rxrdy, rxfull, txrdy, txe, bd, bf} = v;
      @(posedge clk); #1;
      chk(q.rxrdy == v[5] && q.rxfull == v[4] && q.txrdy == v[3] && q.txe == v[2]
          && q.bist_done == v[1] && q.bist_fail == v[0], "live flags");
      chk(q[0] == v[5] && q[3] == v[2] && q[7] == v[0], "bit positions");
    end
    fe = 1; @(posedge clk); #1; fe = 0;
    repeat (5) @(posedge clk); #1;
    chk(q.framing_err && !q.overrun_err, "framing error sticky");
    oe = 1; @(posedge clk); #1; oe = 0;
    chk(q.framing_err && q.overrun_err, "overrun error sticky");
    clr = 1; @(posedge clk); #1; clr = 0;
    chk(!q.framing_err && !q.overrun_err, "cleared by status read");
    clr = 1; fe = 1; @(posedge clk); #1; clr = 0; fe = 0;
    chk(q.framing_err, "new error wins over clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

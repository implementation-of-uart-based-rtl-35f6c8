// Self-checking test of rw_control: one wr_stb per data write at the end of
// the cycle, no strobe for status writes or without chip select, read strobes
// at the end of a read selected by cd, active flags during the cycles.
module tb_rw_control;
  logic clk = 0, rst = 1, cs_n = 1, rd_n = 1, wr_n = 1, cd = 0;
  logic wr_active, rd_active, rd_sel, wr_stb, rd_data_stb, rd_status_stb;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_st = 0;
  always #5 clk = ~clk;

  rw_control dut (.clk, .rst, .cs_n, .rd_n, .wr_n, .cd, .wr_active, .rd_active, .rd_sel,
                  .wr_stb, .rd_data_stb, .rd_status_stb);

  always @(posedge clk) if (!rst) begin
    n_wr <= n_wr + int'(wr_stb);
    n_rd <= n_rd + int'(rd_data_stb);
    n_st <= n_st + int'(rd_status_stb);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus(input bit is_rd, input bit sel, input bit cs, input int len);
    cd = sel; cs_n = !cs;
    if (is_rd) rd_n = 0; else wr_n = 0;
    #1;
    chk(is_rd ? (rd_active == cs) : (wr_active == cs), "active during cycle");
    if (is_rd && cs) chk(rd_sel == sel, "rd_sel");
    repeat (len) @(posedge clk);
    #1;
    chk(wr_stb == 0 && rd_data_stb == 0 && rd_status_stb == 0, "no strobe mid-cycle");
    cd = !sel;  // cd may change once the cycle has started
    rd_n = 1; wr_n = 1; #1;
    cs_n = 1;
    @(posedge clk); #1;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ew = 0, er = 0, es = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      bit r, s, c;
      r = 1'($urandom); s = 1'($urandom); c = ($urandom % 4) != 0;
      bus(r, s, c, 1 + $urandom % 4);
      if (c && !r && !s) ew++;
      if (c && r && !s) er++;
      if (c && r && s) es++;
      chk(n_wr == ew && n_rd == er && n_st == es,
          $sformatf("strobe counts wr %0d/%0d rd %0d/%0d st %0d/%0d", n_wr, ew, n_rd, er, n_st, es));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// Self-checking test of lfsr_tpg: with a trigger every few cycles, each group
// of 8 serial bits on ps must be the next LFSR pattern (LSB first), pp_load
// must come exactly one cycle after the 8th trigger with pp equal to that
// pattern, patterns follow x*s mod (x^8+x^6+x^5+x+1) from seed 01, and clear
// restarts at the seed.
module tb_lfsr_tpg;
  logic clk = 0, rst = 1, clear = 0, trig = 0;
  logic ps, pp_load;
  logic [7:0] pp;
  int checks = 0, failures = 0;
  int n_load = 0;
  always #5 clk = ~clk;

  lfsr_tpg dut (.clk, .rst, .clear, .trig, .ps, .pp, .pp_load);

  function automatic logic [7:0] times_x(input logic [7:0] s);
    logic [8:0] t;
    t = {s, 1'b0};
    if (t[8]) t = t ^ 9'h163;
    return t[7:0];
  endfunction

  always @(posedge clk) if (!rst && pp_load) n_load <= n_load + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] model, got;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    model = 8'h01;
    for (int p = 0; p < 300; p++) begin
      if (p == 260) begin
        clear = 1; @(posedge clk); #1; clear = 0;
        model = 8'h01;
      end
      for (int i = 0; i < 8; i++) begin
        got[i] = ps;
        chk(pp_load == 0, "no pp_load mid-pattern");
        trig = 1; @(posedge clk); #1; trig = 0;
        if (i == 7) begin
          chk(pp_load == 1, "pp_load one cycle after the 8th trigger");
          chk(pp == model, $sformatf("pp %02h vs %02h", pp, model));
        end
        repeat (2 + $urandom % 3) @(posedge clk);
        #1;
      end
      chk(got == model, $sformatf("pattern %0d serial %02h vs %02h", p, got, model));
      model = times_x(model);
    end
    chk(n_load == 300, "one pp_load per pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

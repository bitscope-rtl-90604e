// tb_zzclk_ctrl: checks the three pin states of the sample-clock control:
// released gives a tick every cycle, a held level gives none, each low-to-high
// step gives exactly one tick one cycle after the pin rises, and release then
// hold high gives no extra tick.
module tb_zzclk_ctrl;
  logic clk = 0, rst_n = 0, ra3_oe = 1, ra3_out = 0, zz_tick, zz_level;
  int checks = 0, failures = 0, ticks = 0;
  zzclk_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && zz_tick) ticks++;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    t0 = ticks; repeat (20) @(negedge clk);
    check(ticks == t0, "held low: no ticks");
    check(zz_level == 0, "level low");
    // single steps
    for (int s = 0; s < 10; s++) begin
      t0 = ticks;
      ra3_out = 1;
      #1 check(zz_tick == 0, "no tick before the re-timing edge");
      @(negedge clk); check(zz_tick == 1, "tick after the re-timing edge");
      @(negedge clk); check(zz_tick == 0, "tick lasts one cycle");
      repeat (3) @(negedge clk);
      check(ticks == t0 + 1, "exactly one tick per step");
      check(zz_level == 1, "level high");
      ra3_out = 0; repeat (3) @(negedge clk);
      check(ticks == t0 + 1, "falling edge gives none");
    end
    // free run
    ra3_oe = 0; @(negedge clk); @(negedge clk);
    t0 = ticks; repeat (50) @(negedge clk);
    check(ticks == t0 + 50, "free-running ticks every cycle");
    check(zz_level == 1, "level while running");
    // freeze high
    ra3_oe = 1; ra3_out = 1; @(negedge clk); @(negedge clk);
    t0 = ticks; repeat (20) @(negedge clk);
    check(ticks == t0, "frozen high: no ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

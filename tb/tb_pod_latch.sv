// tb_pod_latch: checks that the POD latch follows its input while the
// sample clock is frozen high, captures on ticks, holds while frozen low, and
// reads zero with its output disabled.
module tb_pod_latch;
  logic clk = 0, rst_n = 0, zz_tick = 0, zz_level = 0, oe = 1;
  logic [7:0] d = 0, q;
  int checks = 0, failures = 0;
  pod_latch dut (.clk, .rst_n, .zz_tick, .zz_level, .oe, .d, .q);
  always #5 clk = ~clk;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] held;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      held = q;
      zz_level = 1'($urandom); zz_tick = 1'($urandom); oe = 1'($urandom_range(0, 3) != 0);
      d = 8'($urandom);
      @(negedge clk);
      if (zz_level || zz_tick) held = d;
      if (!oe) check(q == 8'h00, "disabled reads zero");
      else     check(q == held, $sformatf("q %02x want %02x", q, held));
      oe = 1; #1;
      check(q == held, "held value");
      zz_tick = 0; zz_level = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

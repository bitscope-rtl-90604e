// tb_flash_adc: checks the conversion over and beyond the 0..2 V span
// (code = floor(v*256/2000) limited to 0..255), that the code changes only on
// a sample-clock tick, and the output enable.
module tb_flash_adc;
  logic clk = 0, rst_n = 0, zz_tick = 0, oe = 1;
  logic signed [15:0] vin_mv = 0; logic [7:0] d;
  int checks = 0, failures = 0;
  flash_adc dut (.*);
  always #5 clk = ~clk;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int want, held;
    repeat (2) @(negedge clk); rst_n = 1;
    held = 0;
    for (int n = 0; n < 500; n++) begin
      vin_mv = 16'($urandom_range(0, 2600) - 300); zz_tick = 1'($urandom); oe = 1'($urandom_range(0, 4) != 0);
      want = (vin_mv * 256) / 2000; if (vin_mv < 0) want = 0; if (want > 255) want = 255;
      @(negedge clk);
      if (zz_tick) held = want;
      check(d == (oe ? 8'(held) : 8'h00), $sformatf("vin %0d d %0d want %0d", vin_mv, d, held));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

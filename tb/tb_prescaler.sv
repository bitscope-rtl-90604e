// tb_prescaler: checks the divide-by-64 output: period of 64 input cycles,
// 50% duty, and a low output while switched off.
module tb_prescaler;
  logic rf = 0, rst_n = 0, enable = 0, out;
  int checks = 0, failures = 0;
  prescaler dut (.rf_in(rf), .rst_n, .enable, .out);
  always #1 rf = ~rf;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int hi, lo;
    repeat (2) @(posedge rf); rst_n = 1;
    repeat (100) begin @(negedge rf); check(out == 0, "off holds low"); end
    enable = 1;
    // time between edges of out, in input periods (input period = 2 time units)
    @(posedge out);
    for (int p = 0; p < 5; p++) begin
      realtime tr, tf, tn;
      tr = $realtime;
      @(negedge out); tf = $realtime;
      @(posedge out); tn = $realtime;
      hi = int'((tf - tr) / 2.0); lo = int'((tn - tf) / 2.0);
      check(hi == 32 && lo == 32, $sformatf("period hi %0d lo %0d", hi, lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

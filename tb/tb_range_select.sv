// tb_range_select: checks the four range gains 4.583, 1, 0.5 and 0.190
// (within 1 mV) and the +/-5 V output limit; also that each range maps its
// full-scale input (130 mV, 600 mV, 1.2 V, 3.16 V) to about 0.6 V.
module tb_range_select;
  logic signed [15:0] in_mv, out_mv; logic [1:0] rng;
  int checks = 0, failures = 0;
  range_select dut (.*);
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real g [4] = '{4.583, 1.0, 0.5, 0.190};
    int fs [4] = '{130, 600, 1200, 3160};
    real want;
    for (int n = 0; n < 400; n++) begin
      in_mv = 16'($urandom_range(0, 8000) - 4000); rng = 2'(n % 4); #1;
      want = in_mv * g[rng];
      if (want > 5000) want = 5000; if (want < -5000) want = -5000;
      check(out_mv - want <= 1.0 && want - out_mv <= 1.0,
            $sformatf("rng %0d in %0d out %0d want %f", rng, in_mv, out_mv, want));
    end
    for (int r = 0; r < 4; r++) begin
      in_mv = 16'(fs[r]); rng = 2'(r); #1;
      check(out_mv >= 590 && out_mv <= 610, $sformatf("full scale range %0d -> %0d mV", r, out_mv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_adc_buffer: checks the +/-600 mV clamp, the gain of 1.667, the 1 V
// centre offset (within 1 mV) and the zero-crossing edge output.
module tb_adc_buffer;
  logic signed [15:0] in_mv, out_mv; logic edge_out;
  int checks = 0, failures = 0;
  adc_buffer dut (.*);
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real c, want;
    for (int n = 0; n < 400; n++) begin
      in_mv = 16'($urandom_range(0, 3000) - 1500); #1;
      c = in_mv; if (c > 600) c = 600; if (c < -600) c = -600;
      want = c * 1.667 + 1000;
      check(out_mv - want <= 1.0 && want - out_mv <= 1.0, $sformatf("in %0d out %0d want %f", in_mv, out_mv, want));
      check(edge_out == (in_mv > 0), "edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

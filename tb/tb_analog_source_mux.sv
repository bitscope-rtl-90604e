// tb_analog_source_mux: checks the four-way source selection, the POD
// attenuation of 4.830 (within 1 mV) and the channel LEDs.
module tb_analog_source_mux;
  logic signed [15:0] bnc_a_mv, bnc_b_mv, pod_a_mv, pod_b_mv, out_mv;
  logic chab, pg1, led_en; logic [3:0] led;
  int checks = 0, failures = 0;
  analog_source_mux dut (.*);
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real want;
    for (int n = 0; n < 400; n++) begin
      bnc_a_mv = 16'($urandom_range(0, 6000) - 3000); bnc_b_mv = 16'($urandom_range(0, 6000) - 3000);
      pod_a_mv = 16'($urandom_range(0, 30000) - 15000); pod_b_mv = 16'($urandom_range(0, 30000) - 15000);
      {pg1, chab} = 2'(n % 4); led_en = 1'($urandom);
      #1;
      case ({pg1, chab})
        2'd0: want = bnc_a_mv;
        2'd1: want = bnc_b_mv;
        2'd2: want = pod_a_mv / 4.830;
        default: want = pod_b_mv / 4.830;
      endcase
      check(out_mv - want <= 1.0 && want - out_mv <= 1.0,
            $sformatf("sel %0d out %0d want %f", {pg1, chab}, out_mv, want));
      check(led == (led_en ? (4'b1 << {pg1, chab}) : 4'b0), "led");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

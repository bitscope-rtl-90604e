// tb_data_mux: exhaustive check of the 8:1 bit multiplexer on random buses.
module tb_data_mux;
  logic [7:0] bus; logic [2:0] sel; logic y;
  int checks = 0, failures = 0;
  data_mux dut (.bus, .sel, .y);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 64; n++) begin
      bus = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s); #1;
        checks++;
        if (y !== ((bus >> s) & 1)) begin failures++; $display("FAIL bus %02x sel %0d", bus, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

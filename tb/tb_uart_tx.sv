// tb_uart_tx: self-checking test of the 8N1 serial transmitter.
// Sends random bytes at a small bit time and decodes the line in the
// testbench by sampling each bit at its middle; checks start, data and stop
// bits, the frame length (10 bit times) and in_ready.
module tb_uart_tx;
  localparam int DIV = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, txd;
  logic [7:0] in_data = 0;
  int checks = 0, failures = 0;

  uart_tx dut (.clk, .rst_n, .div(16'(DIV)), .in_valid, .in_data, .in_ready, .txd);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(txd === 1'b1 && in_ready, "idle high and ready");
    for (int n = 0; n < 40; n++) begin
      b = 8'($urandom);
      @(negedge clk); in_valid = 1; in_data = b;
      @(negedge clk); in_valid = 0;
      check(!in_ready, "busy after accept");
      // line went low at the accepting edge; sample mid-bit
      repeat (DIV/2 - 1) @(negedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        got[i] = txd;
      end
      repeat (DIV) @(negedge clk);
      check(txd == 1'b1, "stop bit");
      check(got == b, $sformatf("data %02x got %02x", b, got));
      t0 = 0;
      while (!in_ready) begin @(negedge clk); t0++; end
      check(t0 <= DIV/2 + 1, $sformatf("frame length, ready %0d cycles after mid-stop", t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_uart_rx: self-checking test of the 8N1 serial receiver.
// Drives frames from the testbench (with random idle gaps), checks every
// received byte and its start pulse, and checks that a frame with a bad stop
// bit gives no byte, that a line break (line held low for many bit times)
// gives exactly one byte 00, and that no frame starts until the line has
// returned high.
module tb_uart_rx;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, rxd = 1, start, out_valid;
  logic [7:0] out_data;
  int checks = 0, failures = 0, nvalid = 0, nstart = 0;
  logic [7:0] last;

  uart_rx dut (.clk, .rst_n, .div(16'(DIV)), .rxd, .start, .out_valid, .out_data);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (out_valid) begin nvalid++; last = out_data; end
    if (start) nstart++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(negedge clk); end
    rxd = stop; repeat (DIV) @(negedge clk);
    rxd = 1;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int v0, s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 50; n++) begin
      b = 8'($urandom);
      v0 = nvalid; s0 = nstart;
      send(b, 1'b1);
      repeat (DIV + $urandom_range(0, 20)) @(negedge clk);
      check(nvalid == v0 + 1, "one byte per frame");
      check(nstart == s0 + 1, "one start pulse per frame");
      check(last == b, $sformatf("byte %02x got %02x", b, last));
    end
    v0 = nvalid;
    send(8'h55, 1'b0);
    repeat (3*DIV) @(negedge clk);
    check(nvalid == v0, "framing error dropped");
    // framing error followed by a low line: no byte, no new start while low
    v0 = nvalid; s0 = nstart;
    send(8'h55, 1'b0); rxd = 0; repeat (5*DIV) @(negedge clk); rxd = 1;
    repeat (3*DIV) @(negedge clk);
    check(nvalid == v0 && nstart == s0 + 1, "bad stop then low line: nothing");
    // break: line low for 20 bit times
    v0 = nvalid; s0 = nstart;
    rxd = 0; repeat (20*DIV) @(negedge clk); rxd = 1;
    repeat (3*DIV) @(negedge clk);
    check(nvalid == v0 + 1 && last == 8'h00, "break gives one byte 00");
    check(nstart == s0 + 1, "break gives one start pulse");
    v0 = nvalid;
    send(8'hc3, 1'b1); repeat (2*DIV) @(negedge clk);
    check(nvalid == v0 + 1 && last == 8'hc3, "byte after break");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

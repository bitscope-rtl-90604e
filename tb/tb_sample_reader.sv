// tb_sample_reader: checks bit-serial read-back through two data MUXes.
// The testbench holds two random 256-byte memories addressed by its own
// counter, which advances on each tick of a zzclk_ctrl fed by the reader.
// Each read must return both bytes at the current address, advance the
// counter by exactly one and take 8*SETTLE + STEP_CYCLES cycles.
module tb_sample_reader;
  localparam int SETTLE = 2, STEP = 8;
  logic clk = 0, rst_n = 0, start = 0, abort = 0;
  logic logic_y, adc_y, ra3_oe, ra3_out, busy, done, zz_tick, zz_level;
  logic [2:0] sel; logic [7:0] logic_byte, adc_byte;
  logic [7:0] lmem [256], amem [256];
  logic [7:0] addr = 0;
  int checks = 0, failures = 0;

  sample_reader #(.SETTLE(SETTLE), .STEP_CYCLES(STEP)) dut (.*);
  // while the reader is idle the controller holds the clock frozen high
  zzclk_ctrl u_zz (.clk, .rst_n, .ra3_oe(busy ? ra3_oe : 1'b1), .ra3_out(busy ? ra3_out : 1'b1),
                   .zz_tick, .zz_level);
  data_mux u_ml (.bus(lmem[addr]), .sel, .y(logic_y));
  data_mux u_ma (.bus(amem[addr]), .sel, .y(adc_y));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && zz_tick) addr <= addr + 8'd1;

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc; logic [7:0] a0;
    for (int i = 0; i < 256; i++) begin lmem[i] = 8'($urandom); amem[i] = 8'($urandom); end
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    addr = 8'($urandom);
    repeat (2) @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      a0 = addr;
      start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      repeat (3) @(negedge clk);
      check(logic_byte == lmem[a0] && adc_byte == amem[a0],
            $sformatf("addr %0d got %02x/%02x want %02x/%02x", a0, logic_byte, adc_byte, lmem[a0], amem[a0]));
      check(addr == a0 + 8'd1, "one step per sample");
      check(cyc == 8 * SETTLE + STEP, $sformatf("read time %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

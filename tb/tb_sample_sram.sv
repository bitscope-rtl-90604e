// tb_sample_sram: writes random data at random addresses with store and
// zz_tick, checks read-back against a reference array, and checks that
// nothing is written without a tick or with store low. Uses the full 32K size.
module tb_sample_sram;
  logic clk = 0, zz_tick = 0, store = 0;
  logic [14:0] addr = 0; logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [int];
  int checks = 0, failures = 0;
  sample_sram dut (.clk, .zz_tick, .store, .addr, .wdata, .rdata);
  always #5 clk = ~clk;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int a;
    // fill 300 locations
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); a = $urandom_range(0, 32767);
      addr = 15'(a); wdata = 8'($urandom); store = 1; zz_tick = 1;
      ref_mem[a] = wdata;
    end
    @(negedge clk); zz_tick = 0;
    // writes that must not happen
    foreach (ref_mem[k]) begin
      @(negedge clk); addr = 15'(k); wdata = ~ref_mem[k]; store = 1; zz_tick = 0;
      @(negedge clk); store = 0; zz_tick = 1;
    end
    @(negedge clk); store = 0; zz_tick = 0;
    foreach (ref_mem[k]) begin
      addr = 15'(k); #1;
      check(rdata == ref_mem[k], $sformatf("addr %0d got %02x want %02x", k, rdata, ref_mem[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

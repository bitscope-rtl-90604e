// tb_spock_link: checks the shift-mode sequencer against a Spock and the
// sample-clock control. A load ('>') of random R3..R7 must leave Spock holding
// them and report the previous counter; a read ('<', recirculating) must
// report the counter and leave every Spock register unchanged. Also checks the
// sequence length (40 bits of BIT_CYCLES) and that abort stops it.
module tb_spock_link;
  localparam int BITC = 8;
  logic clk = 0, rst_n = 0, start = 0, abort = 0, recirc = 0;
  logic [39:0] load_data = 0;
  logic shift_out, shift_mode, shift_in, ra3_oe, ra3_out, busy, done;
  logic [15:0] captured;
  logic zz_tick, zz_level;
  logic trig_match, trig7, pg1; logic [14:0] ram_addr; logic [15:0] counter;
  logic [7:0] pattern, mask; logic [3:0] option;
  int checks = 0, failures = 0;

  spock_link #(.BIT_CYCLES(BITC)) dut (.*);
  zzclk_ctrl u_zz (.clk, .rst_n, .ra3_oe(busy ? ra3_oe : 1'b1), .ra3_out(busy ? ra3_out : 1'b0),
                   .zz_tick, .zz_level);
  spock u_sp (.clk, .rst_n, .zz_tick, .shift_mode, .shift_in, .shift_out,
              .logic_bus(8'h00), .adc_bus(8'h00), .event1(1'b0), .event2(1'b0),
              .trig_match, .trig7, .pg1, .ram_addr, .counter, .pattern, .mask, .option);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic run(input logic [39:0] d, input logic rc, output int cycles);
    @(negedge clk); load_data = d; recirc = rc; start = 1;
    @(negedge clk); start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [39:0] d; logic [15:0] prev; int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    prev = 16'h0000;
    for (int k = 0; k < 12; k++) begin
      d = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      run(d, 1'b0, cyc);
      check(cyc == 40 * BITC, $sformatf("load length %0d", cyc));
      check(captured == prev, $sformatf("old counter %04x want %04x", captured, prev));
      check(counter == d[15:0] && pattern == d[23:16] && mask == d[31:24] && option == d[35:32],
            "Spock loaded");
      // read back: only R7..R5 are given, counter must survive
      run({d[39:16], 16'h0000}, 1'b1, cyc);
      check(captured == d[15:0], $sformatf("read %04x want %04x", captured, d[15:0]));
      check(counter == d[15:0] && pattern == d[23:16] && mask == d[31:24] && option == d[35:32],
            "Spock unchanged by read");
      prev = d[15:0];
    end
    // abort
    @(negedge clk); load_data = '1; recirc = 0; start = 1;
    @(negedge clk); start = 0;
    repeat (50) @(negedge clk);
    abort = 1; @(negedge clk); abort = 0;
    check(!busy && !shift_mode, "abort stops the sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

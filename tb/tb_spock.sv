// tb_spock: self-checking test of the Spock PLD model.
// Loads the five bytes of a preload by shifting 40 bits MSB first and checks
// the resulting counter, pattern, mask and option, and that the old counter
// came out MSB first. Then runs random cycles of counting, shifting and idle
// with random buses and events against an independent reference, checking
// the counter, RAM address, PG1, trigger match (pattern with don't-care mask)
// and every TRIG7 source.
module tb_spock;
  logic clk = 0, rst_n = 0, zz_tick = 0, shift_mode = 0, shift_in = 0, shift_out;
  logic [7:0] logic_bus = 0, adc_bus = 0;
  logic event1 = 0, event2 = 0, trig_match, trig7, pg1;
  logic [14:0] ram_addr; logic [15:0] counter; logic [7:0] pattern, mask; logic [3:0] option;
  int checks = 0, failures = 0;

  spock dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // reference state
  logic [15:0] r_cnt; logic [7:0] r_pat, r_msk; logic [3:0] r_opt;

  task automatic tick_shift(input logic b);
    @(negedge clk); shift_mode = 1; shift_in = b; zz_tick = 1;
    @(negedge clk); zz_tick = 0;
  endtask

  function automatic logic ref_match(input logic [7:0] lb, ab);
    logic [7:0] s;
    s = r_opt[0] ? ab : lb;
    for (int i = 0; i < 8; i++) if (!r_msk[i] && s[i] != r_pat[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [39:0] pre; logic [15:0] got; logic exp7;
    repeat (2) @(negedge clk); rst_n = 1;
    // count to a known value first
    r_cnt = 0;
    repeat (1234) begin @(negedge clk); shift_mode = 0; zz_tick = 1; r_cnt++; end
    @(negedge clk); zz_tick = 0;
    check(counter == 16'd1234, "counting");
    for (int k = 0; k < 6; k++) begin
      pre = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      for (int i = 39; i >= 0; i--) begin
        if (i >= 24) got[i-24] = shift_out;
        tick_shift(pre[i]);
      end
      check(got == r_cnt, $sformatf("old counter out %04x want %04x", got, r_cnt));
      r_cnt = pre[15:0]; r_pat = pre[23:16]; r_msk = pre[31:24]; r_opt = pre[35:32];
      check(counter == r_cnt && pattern == r_pat && mask == r_msk && option == r_opt,
            "preload registers");
      // random count-mode cycles
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        shift_mode = 0; zz_tick = 1'($urandom);
        logic_bus = 8'($urandom); adc_bus = 8'($urandom);
        if ($urandom_range(0, 3) == 0) logic_bus = (r_pat & ~r_msk) | (logic_bus & r_msk);
        if ($urandom_range(0, 3) == 0) adc_bus = (r_pat & ~r_msk) | (adc_bus & r_msk);
        event1 = 1'($urandom); event2 = 1'($urandom);
        #1;
        check(trig_match == ref_match(logic_bus, adc_bus), "match");
        case ({r_opt[2], r_opt[1]})
          2'b00: exp7 = logic_bus[7];
          2'b01: exp7 = ref_match(logic_bus, adc_bus);
          2'b10: exp7 = event1;
          default: exp7 = event2;
        endcase
        check(trig7 == exp7, "trig7");
        check(pg1 == r_opt[3] && ram_addr == {r_opt[3], r_cnt[13:0]}, "address");
        @(posedge clk); if (zz_tick) r_cnt++;
        #1 check(counter == r_cnt, "count");
      end
      @(negedge clk); zz_tick = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

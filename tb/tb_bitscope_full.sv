// tb_bitscope_full: one complete capture with the engine at its default
// parameters (50 MHz master clock, 19200 baud host link, 9600 baud POD link,
// 1 us timebase unit and burst, 200 kHz chop, 32K x 8 RAMs).
//
// Over the serial line it resets the machine and reads the ID, resets it
// again with a line break, runs the script example that loads R6 with 0x5a
// and prints it, runs the
// register-preload example (Spock loaded with 0, 0f, aa, 00, 00), programs a
// logic trigger (pattern 0xa5, high nibble only), preloads Spock with '>',
// runs 'T' while the logic POD carries random data, waits for the printed halt
// address and checks it against a reference counter, then dumps the 64 samples
// from 240 before the halt with 'S' and checks each logic byte against a reference
// model of the latch and RAM, and the trigger sample among them.
module tb_bitscope_full;
  localparam int BIT = 50_000_000 / 19_200;

  logic clk = 0, rst_n = 0, serial_in = 1, serial_out;
  logic [7:0] pod_logic = 0;
  logic pod_io1 = 1, pod_io2, rf_in = 0, prescale_on = 0;
  logic signed [15:0] bnc_a_mv = 0, bnc_b_mv = 0, pod_a_mv = 0, pod_b_mv = 0;
  logic [1:0] rng; logic chab; logic [3:0] chan_led;
  int checks = 0, failures = 0;

  bitscope_top dut (.*);
  always #10 clk = ~clk;               // 50 MHz

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  byte unsigned rxq[$];
  initial forever begin
    logic [7:0] b;
    @(negedge serial_out);
    repeat (BIT + BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = serial_out; repeat (BIT) @(posedge clk); end
    if (rst_n) rxq.push_back(b);
  end

  task automatic send(input byte unsigned b);
    serial_in = 0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin serial_in = b[i]; repeat (BIT) @(negedge clk); end
    serial_in = 1; repeat (2 * BIT) @(negedge clk);
  endtask

  task automatic script(input string s);
    for (int i = 0; i < s.len(); i++) send(s[i]);
  endtask

  task automatic quiet(input int cycles);
    int q = 0;
    while (q < cycles) begin @(negedge clk); q = (serial_out && dut.u_host_tx.in_ready) ? q + 1 : 0; end
  endtask

  function automatic string take();
    string s = "";
    while (rxq.size() > 0) s = {s, string'(rxq.pop_front())};
    return s;
  endfunction

  // reference model of the logic path: latch, counter, logic RAM (TRIG7 = match)
  logic [7:0] lmem [32768];
  logic [7:0] latch_m = 0; logic [15:0] cnt_m = 0; logic model_on = 0;
  always @(negedge clk) if (model_on) begin
    if (dut.zz_tick && !dut.shift_mode) begin
      if (dut.store) lmem[{1'b0, cnt_m[13:0]}] = {latch_m[7:4] == 4'ha, latch_m[6:0]};
      cnt_m++;
    end
    if (dut.zz_tick || dut.zz_level) latch_m = pod_logic;
  end

  logic drive = 0, force_trig = 0;
  always @(posedge clk) if (drive) begin
    logic [7:0] r = 8'($urandom);
    #2;
    if (r[7:4] == 4'ha) r[7:4] = 4'h5;
    pod_logic = force_trig ? 8'ha3 : r;
  end

  initial begin
    repeat (30_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string s; logic [15:0] addr, st; int trig_seen = 0;
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    send(8'h00); quiet(3 * BIT); s = take();
    check(s == "\rBitScope\r", "reset prints ID");
    // a line break reaches the reset code 00
    serial_in = 0; repeat (20 * BIT) @(negedge clk); serial_in = 1;
    quiet(3 * BIT); s = take();
    check(s == "\rBitScope\r", "break resets and prints ID");
    // script example: load R6 with 0x5a, then print it
    script("[6]@[5a]sp"); quiet(3 * BIT); s = take();
    check(s == "[6]@[5a]sp\r5a\r", "register script and print");
    // preload example: R3..R7 = 00, 00, aa, 0f, 00, then '>'
    script("[3]@[]sns[aa]ns[f]ns[]ns>");
    quiet(3 * BIT); void'(take());
    check(dut.u_spock.counter == 0 && dut.u_spock.pattern == 8'haa && dut.u_spock.mask == 8'h0f && dut.u_spock.option == 0, "preload example");
    // pattern a5, mask 0f, option 2 (TRIG7 = match), trace 70, delay 4, timebase 1, preload 0
    script("[5]@[a5]s[6]@[f]s[7]@[2]s[8]@[70]s[b]@[4]s[d]@[1]s[e]@[1]s[3]@[]sn[]s>");
    quiet(3 * BIT); s = take();
    check(s == "[5]@[a5]s[6]@[f]s[7]@[2]s[8]@[70]s[b]@[4]s[d]@[1]s[e]@[1]s[3]@[]sn[]s>", "echo");
    check(dut.u_spock.pattern == 8'ha5 && dut.u_spock.mask == 8'h0f && dut.u_spock.option == 4'h2 && dut.u_spock.counter == 0, "preload");
    model_on = 1; drive = 1;
    fork
      send("T");
      begin
        wait (dut.store); repeat (20000) @(negedge clk);
        force_trig = 1; repeat (3) @(negedge clk); force_trig = 0;
      end
    join
    wait (!dut.store);
    drive = 0;
    quiet(4 * BIT); s = take();
    addr = 16'(s.substr(2, 5).atohex());
    check(s.len() == 7 && s.substr(0, 1) == "T\r" && s[6] == "\r", "trace print format");
    check(addr == cnt_m, $sformatf("halt address %04x model %04x", addr, cnt_m));
    // post-trigger delay 4 x 1 us = 200 samples after the trigger
    check(cnt_m > 20200 && cnt_m < 20600, $sformatf("samples taken %0d", cnt_m));
    model_on = 0;
    st = addr - 16'd240;
    script($sformatf("[9]@[%0x]s[a]@[%0x]s[f]@[40]sS", st[7:0], st[15:8]));
    quiet(4 * BIT); s = take();
    s = s.substr(s.len() - (1 + 64 * 5), s.len() - 1);
    check(s[0] == "\r", "dump starts with CR");
    for (int i = 0; i < 64; i++) begin
      logic [7:0] dd; logic [14:0] a;
      dd = 8'(s.substr(1 + 5 * i, 2 + 5 * i).atohex());
      a = {1'b0, 14'(st + 16'(i))};
      check(dd == lmem[a], $sformatf("sample %0d logic %02x want %02x", i, dd, lmem[a]));
      if (dd[7]) trig_seen++;
    end
    check(trig_seen > 0, "trigger samples in the dump");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

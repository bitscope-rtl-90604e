// tb_bitscope_top: end-to-end test of the capture engine over its serial port.
//
// The testbench talks to the engine only through the serial line (its own
// bit-banged transmitter and receiver), drives the logic POD, the analog
// inputs, the POD I/O line and the prescaler input, and keeps a reference
// model of the sample path (latch, ADC chain, address counter, both RAMs)
// stepped on every sample-clock tick. It runs, and counts, each mechanism:
//   script entry and echo, Spock preload '>', pattern/mask trigger on the
//   logic bus, post-trigger delay, halt and address print, CSV dump 'S' with
//   every value checked against the model, counter read '<', 'u', 'p', '?',
//   reset, chop (trace mode 2), timebase expansion (mode 1), ADC-bus trigger,
//   prescaler EVENT1 as TRIG7, PG1 bank/source switch, abort by a new byte,
//   POD byte exchange 'x' and pass-through '|'.
// A mechanism that never happened counts as a failure.
module tb_bitscope_top;
  localparam int CLK_HZ = 1_920_000;           // 100 cycles per bit at 19200 baud
  localparam int BIT = CLK_HZ / 19_200, PBIT = CLK_HZ / 9_600;
  localparam int TICK = 3, BURST = 4, CHOP = 12;

  logic clk = 0, rst_n = 0, serial_in = 1, serial_out;
  logic [7:0] pod_logic = 0;
  logic pod_io1 = 1, pod_io2, rf_in = 0, prescale_on = 0;
  logic signed [15:0] bnc_a_mv = 0, bnc_b_mv = 0, pod_a_mv = 0, pod_b_mv = 0;
  logic [1:0] rng; logic chab; logic [3:0] chan_led;
  int checks = 0, failures = 0;

  bitscope_top #(.CLK_HZ(CLK_HZ), .TICK_CYCLES(TICK), .BURST_CYCLES(BURST),
                 .CHOP_CYCLES(CHOP)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // ---------------- serial line ----------------
  byte unsigned rxq[$];
  initial forever begin
    logic [7:0] b;
    @(negedge serial_out);
    repeat (BIT + BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = serial_out; repeat (BIT) @(posedge clk); end
    if (rst_n && !dut.pass_active) rxq.push_back(b);
  end

  task automatic send(input byte unsigned b);
    serial_in = 0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin serial_in = b[i]; repeat (BIT) @(negedge clk); end
    serial_in = 1; repeat (BIT) @(negedge clk);
  endtask

  task automatic script(input string s);
    for (int i = 0; i < s.len(); i++) begin send(s[i]); repeat (BIT) @(negedge clk); end
  endtask

  task automatic quiet(input int cycles);   // wait until the output has been idle a while
    int q = 0;
    while (q < cycles) begin @(negedge clk); q = (serial_out && dut.u_host_tx.in_ready) ? q + 1 : 0; end
  endtask

  function automatic string take();
    string s = "";
    while (rxq.size() > 0) s = {s, string'(rxq.pop_front())};
    return s;
  endfunction

  task automatic flush();
    quiet(2 * BIT); void'(take());
  endtask

  // set register r to v through the command set
  task automatic setreg(input int r, input int v);
    script($sformatf("[%0x]@[%0x]s", r, v));
  endtask

  // ---------------- reference model of the sample path ----------------
  logic [7:0] lmem [32768], amem [32768];
  logic [7:0] latch_m = 0, adc_m = 0;
  logic [15:0] cnt_m = 0;
  logic [7:0] pat_m = 0, msk_m = 0; logic [3:0] opt_m = 0;
  int ticks_store = 0;

  function automatic logic [7:0] adc_code(input int mv_in, input int rng_sel);
    real g, v; int code;
    g = (rng_sel == 0) ? 4.583 : (rng_sel == 1) ? 1.0 : (rng_sel == 2) ? 0.5 : 0.190;
    v = mv_in * g; if (v > 5000) v = 5000; if (v < -5000) v = -5000;
    if (v > 600) v = 600; if (v < -600) v = -600;
    v = v * 1.667 + 1000;
    code = int'($floor(v * 256.0 / 2000.0));
    if (code < 0) code = 0; if (code > 255) code = 255;
    return 8'(code);
  endfunction

  function automatic logic match_m(input logic [7:0] lb, input logic [7:0] ab);
    logic [7:0] s = opt_m[0] ? ab : lb;
    return &(~(s ^ pat_m) | msk_m);
  endfunction

  int src_mv;
  always_comb begin
    case ({dut.pg1, chab})
      2'd0: src_mv = bnc_a_mv;
      2'd1: src_mv = bnc_b_mv;
      2'd2: src_mv = int'(pod_a_mv / 4.830);
      default: src_mv = int'(pod_b_mv / 4.830);
    endcase
  end

  // Stepped at the falling edge, where everything the next rising edge uses is stable.
  logic model_on = 0;
  always @(negedge clk) if (model_on) begin
    if (dut.zz_tick && !dut.shift_mode) begin
      if (dut.store) begin
        logic t7;
        case ({opt_m[2], opt_m[1]})
          2'b00: t7 = latch_m[7];
          2'b01: t7 = match_m(latch_m, adc_m);
          2'b10: t7 = dut.event1;
          default: t7 = dut.event2;
        endcase
        lmem[{opt_m[3], cnt_m[13:0]}] = {t7, latch_m[6:0]};
        amem[{opt_m[3], cnt_m[13:0]}] = adc_m;
        ticks_store++;
      end
      cnt_m++;
    end
    if (dut.zz_tick) adc_m = adc_code(src_mv, rng);
    if (dut.zz_tick || dut.zz_level) latch_m = pod_logic;
  end

  // ---------------- stimulus generators ----------------
  logic drive_logic = 0;
  logic [7:0] trig_val = 0; logic force_trig = 0; logic [3:0] avoid_hi = 4'ha;
  // inputs change shortly after the rising edge, so the model sees at the
  // falling edge what the next rising edge will sample
  always @(posedge clk) if (drive_logic) begin
    logic [7:0] r = 8'($urandom);
    #2;
    if (r[7:4] == avoid_hi) r[7:4] = ~avoid_hi;
    pod_logic = force_trig ? trig_val : r;
  end
  int tri_ph = 0;
  always @(posedge clk) begin          // triangle on channel A, sawtooth on B
    #2;
    tri_ph = (tri_ph + 1) % 400;
    bnc_a_mv = 16'((tri_ph < 200) ? (tri_ph * 7 - 700) : ((400 - tri_ph) * 7 - 700));
    bnc_b_mv = 16'((tri_ph % 100) * 10 - 500);
    pod_a_mv = 16'(tri_ph * 10 - 2000);
    pod_b_mv = -16'sd1000;
  end
  always #7 if (prescale_on) rf_in = ~rf_in;

  // ---------------- mechanism counters ----------------
  int n_echo = 0, n_preload = 0, n_trig_logic = 0, n_delay = 0, n_dump_vals = 0, n_read = 0,
      n_chop = 0, n_tbexp_freeze = 0, n_trig_adc = 0, n_trig_event1 = 0, n_pg1 = 0, n_abort = 0,
      n_xchg = 0, n_pass = 0, n_id = 0, n_print = 0, n_update = 0;
  logic chab_q = 0, frz_q = 0;
  always @(posedge clk) begin
    if (dut.u_vm.tr_busy && chab != chab_q) n_chop++;
    chab_q <= chab;
    if (dut.u_vm.tr_busy && dut.u_vm.regs[8][0] && dut.u_vm.ra3_oe && !frz_q) n_tbexp_freeze++;
    frz_q <= dut.u_vm.tr_busy && dut.u_vm.ra3_oe;
  end

  // run a trace: returns the printed address and the model's counter
  task automatic trace(output logic [15:0] printed, output string txt);
    string s;
    send("T");
    txt = "";
    // wait for the print: "T\rhhhh\r"
    while (1) begin
      @(negedge clk);
      s = "";
      foreach (rxq[i]) s = {s, string'(rxq[i])};
      if (s.len() >= 7 && s[s.len()-1] == "\r") break;
    end
    quiet(3 * BIT);
    txt = take();
    printed = 16'(txt.substr(2, 5).atohex());
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string s, tok; logic [15:0] addr, start_a; int pos, trig_idx;
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);

    // --- reset vector and ID
    send(8'h00); quiet(3 * BIT); s = take();
    check(s == "\rBitScope\r", "reset prints ID"); n_id++;
    script("?"); quiet(3 * BIT); s = take();
    check(s == "?\rBitScope\r", "? prints ID"); n_id++;

    // --- set up: pattern a5 mask 0f, option 1 (TRIG7 = match, logic bus),
    //     trace option 70 (logic MUX line 7), delay 2, timebase 3, range 1 on A,
    //     alternate nibble: channel B; preload 0000
    setreg(5, 'ha5); setreg(6, 'h0f); setreg(7, 'h02); setreg(8, 'h70);
    setreg(11, 2); setreg(12, 0); setreg(13, 3); setreg(14, 'h51);
    setreg(3, 0); setreg(4, 0);
    s = take(); check(s.len() > 40 && s.substr(0, 7) == "[5]@[a5]", "echo of script"); n_echo += s.len();
    script(">"); quiet(3 * BIT); flush();
    check(dut.u_spock.counter == 16'h0000 && dut.u_spock.pattern == 8'ha5 && dut.u_spock.mask == 8'h0f && dut.u_spock.option == 4'h2,
          "preload loaded into Spock"); n_preload++;
    pat_m = 8'ha5; msk_m = 8'h0f; opt_m = 4'h2; cnt_m = 16'h0000;

    // --- trace on a logic pattern
    model_on = 1; drive_logic = 1; force_trig = 0;
    fork
      begin
        trace(addr, s);
      end
      begin
        wait (dut.store); repeat (3000) @(negedge clk);
        trig_val = 8'ha3; force_trig = 1; repeat (6) @(negedge clk); force_trig = 0;
      end
    join
    drive_logic = 0;
    check(dut.u_vm.u_trace.triggered, "logic trigger seen"); n_trig_logic++;
    check(addr == cnt_m, $sformatf("printed address %04x model %04x", addr, cnt_m));
    check(dut.u_vm.regs[9] == addr[7:0] && dut.u_vm.regs[10] == addr[15:8], "R9,R10 = frozen address");
    check(ticks_store > 3000, "samples stored");
    n_delay++;

    // --- dump 48 samples ending at the halt address; R15 = 0x30
    start_a = addr - 16'd48;
    setreg(9, start_a[7:0]); setreg(10, start_a[15:8]); setreg(15, 'h30);
    flush();
    script("S"); quiet(6 * BIT); s = take();
    check(s.len() == 2 + 48 * 5, $sformatf("dump length %0d", s.len()));
    pos = 2; trig_idx = -1;
    for (int i = 0; i < 48 && pos + 5 <= s.len(); i++) begin
      logic [7:0] dd, aa; logic [14:0] a;
      tok = s.substr(pos, pos + 3);
      dd = 8'(tok.substr(0, 1).atohex()); aa = 8'(tok.substr(2, 3).atohex());
      a = 15'(start_a + 16'(i));
      a[14] = 1'b0;
      check(dd == lmem[a], $sformatf("dump %0d logic %02x want %02x", i, dd, lmem[a]));
      check(aa + 1 >= amem[a] && aa <= amem[a] + 1, $sformatf("dump %0d adc %02x want %02x", i, aa, amem[a]));
      check(s[pos + 4] == (((i % 16) == 15) ? "\r" : ","), "dump separator");
      if (dd[7] && trig_idx < 0) trig_idx = i;
      pos += 5; n_dump_vals++;
    end
    check(trig_idx >= 0, "trigger sample (bit 7 = match) inside the dump");
    check({dut.u_vm.regs[10], dut.u_vm.regs[9]} == addr, "R10:R9 advanced past the dump");

    // --- '<', 'u', 'p'
    script("<"); quiet(3 * BIT); flush();
    check({dut.u_vm.regs[10], dut.u_vm.regs[9]} == dut.u_spock.counter, "< reads the counter"); n_read++;
    setreg(3, 'h21); setreg(4, 'h43); script("u"); flush();
    check(dut.u_vm.regs[9] == 8'h21 && dut.u_vm.regs[10] == 8'h43, "u copies preload"); n_update++;
    script("[d]@"); flush(); script("p"); quiet(3 * BIT); s = take();
    check(s == "p\r03\r", $sformatf("p prints R13: '%s'", s)); n_print++;

    // --- chop, trace mode 2: channel flips while waiting; trigger on ADC bus MSB
    //     (option 3: TRIG7 = match, ADC bus; pattern 80 mask 7f)
    setreg(5, 'h80); setreg(6, 'h7f); setreg(7, 'h03); setreg(8, 'h72); setreg(11, 40);
    setreg(3, 0); setreg(4, 0); script(">"); quiet(3 * BIT); flush();
    pat_m = 8'h80; msk_m = 8'h7f; opt_m = 4'h3; cnt_m = 0;
    trace(addr, s);
    check(dut.u_vm.u_trace.triggered, "ADC-bus trigger seen"); n_trig_adc++;
    check(addr == cnt_m, $sformatf("chop: printed %04x model %04x", addr, cnt_m));

    // --- timebase expansion, trace mode 1, trigger from the prescaler (option 5: TRIG7 = EVENT1)
    prescale_on = 1;
    setreg(7, 'h04); setreg(8, 'h71); setreg(13, 2); setreg(11, 3);
    script(">"); quiet(3 * BIT); flush();
    opt_m = 4'h4; cnt_m = 16'h0000;
    trace(addr, s);
    check(dut.u_vm.u_trace.triggered, "prescaler EVENT1 trigger seen"); n_trig_event1++;
    check(addr == cnt_m, $sformatf("tbexp: printed %04x model %04x", addr, cnt_m));
    prescale_on = 0;

    // --- PG1: POD analog source and upper RAM half; abort a trace that cannot trigger
    setreg(7, 'h08); setreg(8, 'h70); setreg(13, 0);
    script(">"); quiet(3 * BIT); flush();
    opt_m = 4'h8; cnt_m = 0;
    pod_logic = 8'h00;
    send("T");
    repeat (2000) @(negedge clk);
    check(dut.store && dut.spock_addr[14] && chan_led == 4'b0100, "PG1 selects POD A and upper half");
    n_pg1++;
    send("?"); quiet(3 * BIT); s = take();
    check(!dut.store && s == "T?\rBitScope\r", $sformatf("abort by a new byte: '%s'", s)); n_abort++;
    // upper-half contents: dump a few from 0x4000 region
    setreg(9, 'h10); setreg(10, 'h00); setreg(15, 4); flush();
    script("S"); quiet(6 * BIT); s = take();
    for (int i = 0; i < 4; i++) begin
      logic [7:0] aa; tok = s.substr(2 + 5 * i, 5 + 5 * i); aa = 8'(tok.substr(2, 3).atohex());
      check(aa + 1 >= amem[15'h4010 + 15'(i)] && aa <= amem[15'h4010 + 15'(i)] + 1,
            $sformatf("PG1 dump adc %02x want %02x", aa, amem[15'h4010 + 15'(i)]));
    end
    model_on = 0;

    // --- POD byte exchange
    setreg(18, 'h5c); flush();
    fork
      send("x");
      begin
        logic [7:0] b;
        @(negedge pod_io2); repeat (PBIT + PBIT / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin b[i] = pod_io2; repeat (PBIT) @(negedge clk); end
        check(b == 8'h5c, "x sends R18 at the POD rate");
        repeat (PBIT) @(negedge clk);
        pod_io1 = 0; repeat (PBIT) @(negedge clk);
        for (int i = 0; i < 8; i++) begin pod_io1 = ~b[i]; repeat (PBIT) @(negedge clk); end
        pod_io1 = 1; repeat (PBIT) @(negedge clk);
      end
    join
    quiet(3 * BIT); s = take();
    check(s.len() == 2 && s[1] == 8'ha3 && dut.u_vm.regs[19] == 8'ha3, "x returns the POD reply"); n_xchg++;

    // --- pass-through
    setreg(18, 'h70); flush();
    send("|"); repeat (12 * BIT) @(negedge clk);
    check(dut.pass_active, "pass-through active");
    pod_io1 = 0; repeat (BIT) @(negedge clk);
    check(serial_out == 1'b0, "POD line reaches the host"); n_pass++;
    pod_io1 = 1; repeat (BIT) @(negedge clk);
    script("?"); quiet(3 * BIT); s = take();
    check(!dut.pass_active, "pass-through ended by a new byte");

    // --- every mechanism must have happened
    check(n_echo > 0, "echo");            check(n_preload > 0, "preload");
    check(n_trig_logic > 0, "logic trigger"); check(n_delay > 0, "post-trigger delay");
    check(n_dump_vals == 48, "dump");     check(n_read > 0, "counter read");
    check(n_chop > 0, "chop");            check(n_tbexp_freeze > 0, "timebase expansion");
    check(n_trig_adc > 0, "ADC trigger"); check(n_trig_event1 > 0, "prescaler trigger");
    check(n_pg1 > 0, "PG1");              check(n_abort > 0, "abort");
    check(n_xchg > 0, "byte exchange");   check(n_pass > 0, "pass-through");
    check(n_id > 0 && n_print > 0 && n_update > 0, "print, ID, update");
    $display("mechanisms: echo %0d preload %0d logic-trig %0d delay %0d dump %0d read %0d chop %0d tbexp %0d adc-trig %0d event1 %0d pg1 %0d abort %0d xchg %0d pass %0d",
             n_echo, n_preload, n_trig_logic, n_delay, n_dump_vals, n_read, n_chop, n_tbexp_freeze,
             n_trig_adc, n_trig_event1, n_pg1, n_abort, n_xchg, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

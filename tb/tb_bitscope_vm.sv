// tb_bitscope_vm: self-checking test of the virtual-machine controller.
//
// The controller is connected at byte level (no UART) to the testbench, and
// to a Spock and a sample-clock control for the shift-mode commands. Checks:
//  * random scripts of register commands ('[' ']' nibbles '@' '#' 's' 'l' 'n'
//    '+' '-' 'u') against a reference register model, read back with 'p';
//  * echo of every printable byte and the exact text of 'p', '?' and reset;
//  * '>' leaves R3..R7 in Spock and '<' brings the counter into R9,R10;
//  * 'T' in mode 0 halts after the trigger (logic MUX line, polled at select
//    7) and prints the frozen counter as CR + 4 hex digits + CR;
//  * 'x' sends R18 to a POD model at the POD rate, the reply lands in R19 and
//    is returned; '|' sends R18 at the host rate, then the POD line is passed
//    through until the next byte, which aborts it.
module tb_bitscope_vm;
  import bitscope_pkg::*;
  localparam int HOST_DIV = 16, POD_DIV = 24, TX_BUSY = 40;
  logic clk = 0, rst_n = 0;
  logic rx_start = 0, rx_valid = 0; logic [7:0] rx_data = 0;
  logic tx_valid, tx_ready; logic [7:0] tx_data;
  logic pass_active, pod_io1, pod_io2;
  logic shift_mode, shift_in, shift_out, store, logic_y, adc_y, ra3_oe, ra3_out;
  logic [2:0] sel, porta;
  logic zz_tick, zz_level, trig_match, trig7, pg1;
  logic [14:0] ram_addr; logic [15:0] counter; logic [7:0] pattern, mask; logic [3:0] option;
  logic trig_line = 0;
  int checks = 0, failures = 0;

  bitscope_vm #(.HOST_DIV(HOST_DIV), .POD_DIV(POD_DIV), .TICK_CYCLES(4), .BURST_CYCLES(4),
                .CHOP_CYCLES(10)) dut (.*);
  zzclk_ctrl u_zz (.clk, .rst_n, .ra3_oe, .ra3_out, .zz_tick, .zz_level);
  spock u_sp (.clk, .rst_n, .zz_tick, .shift_mode, .shift_in, .shift_out,
              .logic_bus({trig_line, 7'h00}), .adc_bus(8'h00), .event1(1'b0), .event2(1'b0),
              .trig_match, .trig7, .pg1, .ram_addr, .counter, .pattern, .mask, .option);
  assign logic_y = (sel == 3'd7) ? trig7 : 1'b0;
  assign adc_y   = 1'b0;
  always #5 clk = ~clk;

  // host side: byte sink with a busy time per byte
  byte unsigned outq[$];
  int busy_cnt = 0;
  assign tx_ready = (busy_cnt == 0);
  always @(posedge clk) begin
    if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    else if (rst_n && tx_valid) begin outq.push_back(tx_data); busy_cnt <= TX_BUSY; end
  end

  // POD model: answers a byte b received on IO-2 with ~b on IO-1, at POD_DIV
  logic pod_rx_valid; logic [7:0] pod_rx_data; logic pod_rx_start;
  uart_rx u_podrx (.clk, .rst_n, .div(16'(pod_div_sel)), .rxd(pod_io2), .start(pod_rx_start),
                   .out_valid(pod_rx_valid), .out_data(pod_rx_data));
  int pod_div_sel = POD_DIV;
  logic [7:0] pod_got; int pod_n = 0;
  logic pod_line = 1;
  assign pod_io1 = pod_line;

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic send(input byte unsigned b);
    @(negedge clk); rx_start = 1; @(negedge clk); rx_start = 0;
    repeat (10) @(negedge clk);
    rx_valid = 1; rx_data = b; @(negedge clk); rx_valid = 0;
    repeat (TX_BUSY + 5) @(negedge clk);
  endtask

  task automatic wait_idle(input int cycles);
    int quiet = 0;
    while (quiet < cycles) begin @(negedge clk); quiet = (tx_valid || !tx_ready) ? 0 : quiet + 1; end
  endtask

  function automatic string take_all();
    string s = "";
    while (outq.size() > 0) s = {s, string'(outq.pop_front())};
    return s;
  endfunction

  task automatic pod_send(input logic [7:0] b, input int div);
    pod_line = 0; repeat (div) @(negedge clk);
    for (int i = 0; i < 8; i++) begin pod_line = b[i]; repeat (div) @(negedge clk); end
    pod_line = 1; repeat (div) @(negedge clk);
  endtask

  // reference model of the register commands
  byte unsigned rm [20];
  function automatic byte unsigned rd(input byte unsigned i); return (i < 20) ? rm[i] : 8'h00; endfunction
  function automatic void model(input byte unsigned c);
    byte unsigned t;
    if ((c >= "0" && c <= "9") || (c >= "a" && c <= "f")) begin
      t = rm[0] + ((c <= "9") ? c - "0" : c - "a" + 10);
      rm[0] = {t[3:0], t[7:4]};
    end else case (c)
      "[": rm[0] = 0;
      "]": rm[0] = {rm[0][3:0], rm[0][7:4]};
      "@": rm[1] = rm[0];
      "#": rm[2] = rm[0];
      "s": if (rm[1] < 20) rm[rm[1]] = rm[0];
      "l": rm[0] = rd(rm[2]);
      "n": rm[1] = rm[1] + 1;
      "+": if (rm[1] < 20) rm[rm[1]] = rm[rm[1]] + 1;
      "-": if (rm[1] < 20) rm[rm[1]] = rm[rm[1]] - 1;
      "u": begin rm[9] = rm[3]; rm[10] = rm[4]; end
      default: ;
    endcase
  endfunction

  function automatic string hex2(input byte unsigned b); return $sformatf("%02x", b); endfunction

  task automatic script(input string s);
    for (int i = 0; i < s.len(); i++) begin send(s[i]); model(s[i]); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string s, want; byte unsigned cmds[] = '{"[", "]", "@", "#", "s", "l", "n", "+", "-", "u",
                                              "0", "3", "7", "9", "a", "c", "f", "5"};
    logic [15:0] cnt_at_halt;
    foreach (rm[i]) rm[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);

    // reset vector prints the ID
    send(8'h00); wait_idle(60);
    s = take_all(); check(s == "\rBitScope\r", $sformatf("reset text len %0d first %02x", s.len(), s[0]));
    send("?"); wait_idle(60);
    s = take_all(); check(s == "?\rBitScope\r", "ID text");

    // the document's example: load R6 with 0x5a
    script("[6]@[5a]s"); s = take_all();
    check(s == "[6]@[5a]s", "echo of each command");
    check(dut.regs[6] == 8'h5a, $sformatf("R6 = %02x", dut.regs[6]));
    send("p"); wait_idle(60); s = take_all();
    check(s == "p\r5a\r", $sformatf("print '%s'", s));

    // random register scripts against the model, checked with 'p' on all registers
    for (int k = 0; k < 30; k++) begin
      for (int n = 0; n < 12; n++) begin
        byte unsigned c = cmds[$urandom_range(0, cmds.size() - 1)];
        if (c == "@" || c == "#") begin
          // keep pointers mostly in range
          script("["); script($sformatf("%0x", $urandom_range(0, 21))); script("]");
        end
        script(string'(c));
      end
      void'(take_all());
      foreach (rm[i]) check(dut.regs[i] == rm[i], $sformatf("reg %0d = %02x want %02x", i, dut.regs[i], rm[i]));
    end
    // 'p' through R1 of every register
    for (int r = 0; r < 20; r++) begin
      script($sformatf("[%0x]@", r)); void'(take_all());
      send("p"); wait_idle(60); s = take_all();
      check(s == {"p\r", hex2(rm[r]), "\r"}, $sformatf("p R%0d '%s'", r, s));
    end

    // program Spock: R3..R7 = 34 12 a5 0f 01  (counter 1234, pattern a5, mask 0f, option 1)
    script("[3]@[34]sn[12]sn[a5]sn[f]sn[1]s>"); wait_idle(400); void'(take_all());
    check(counter == 16'h1234 && pattern == 8'ha5 && mask == 8'h0f && option == 4'h1,
          $sformatf("Spock %04x %02x %02x %1x", counter, pattern, mask, option));
    script("<"); wait_idle(400); void'(take_all());
    check(dut.regs[9] == 8'h34 && dut.regs[10] == 8'h12, "counter read into R9,R10");
    check(counter == 16'h1234 && pattern == 8'ha5 && mask == 8'h0f, "Spock kept by read");

    // trace: option 0 (TRIG7 = DD7), trace mode 0, poll logic MUX select 7, delay 3, R13 2
    script("[7]@[]s[8]@[70]s[b]@[3]s[c]@[]s[d]@[2]s[3]@[]sn[]s>"); wait_idle(400); void'(take_all());
    trig_line = 0;
    send("T");
    repeat (200) @(negedge clk);
    check(dut.u_trace.busy && store, "sampling while waiting");
    trig_line = 1;
    wait (!dut.u_trace.busy); repeat (3) @(negedge clk); cnt_at_halt = counter;
    wait_idle(2000); s = take_all();
    want = {"T\r", $sformatf("%04x", cnt_at_halt), "\r"};
    check(s == want, $sformatf("trace print '%s' want '%s'", s, want));
    check(cnt_at_halt > 16'd200, "counter ran while sampling");
    trig_line = 0;

    // 'x': slow byte exchange
    script("[12]@[c3]s"); void'(take_all());
    fork
      begin
        @(posedge pod_rx_valid); pod_got = pod_rx_data;
        repeat (30) @(negedge clk);
        pod_send(~pod_got, POD_DIV);
      end
      begin send("x"); wait_idle(3000); end
    join
    s = take_all();
    check(pod_got == 8'hc3, "POD received R18");
    check(dut.regs[19] == 8'h3c, "R19 holds the reply");
    check(s.len() == 2 && s[0] == "x" && s[1] == 8'h3c, "reply returned to host");

    // '|': pass-through at the host rate
    pod_div_sel = HOST_DIV;
    script("[12]@[70]s"); void'(take_all());
    fork
      begin @(posedge pod_rx_valid); pod_got = pod_rx_data; end
      send("|");
    join
    repeat (12 * HOST_DIV) @(negedge clk);
    check(pod_got == 8'h70, "pass-through byte sent to POD");
    check(pass_active, "POD line connected to host");
    send("?"); wait_idle(60);
    check(!pass_active, "next byte ends pass-through");
    s = take_all(); check(s == "|?\rBitScope\r", $sformatf("after pass '%s'", s));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

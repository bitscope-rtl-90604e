// tb_trace_ctrl: self-checking test of the trace loop.
// For random timebase and delay values in each of the four trace modes it
// checks: the clock runs (RA3 released) while waiting and during the delay;
// in timebase-expansion modes it alternates frozen spans of tbase*TICK cycles
// with bursts of BURST cycles; the trigger is taken on a rising edge only,
// and only while the clock runs; the time from trigger to halt equals
// delay*max(tbase,1)*TICK (simple) or delay*(tbase*TICK+BURST) (expansion);
// chop flips come every CHOP cycles (simple) or once per burst (expansion);
// after the halt the clock is frozen at freeze_level and STORE is low; abort
// stops at once.
module tb_trace_ctrl;
  localparam int TICK = 4, BURST = 3, CHOP = 5;
  logic clk = 0, rst_n = 0, start = 0, abort = 0, trig_in = 0, freeze_level = 0;
  logic [3:0] mode = 0; logic [7:0] tbase = 0; logic [15:0] delay = 0;
  logic store, ra3_oe, ra3_out, chop_flip, busy, done, triggered;
  int checks = 0, failures = 0;
  int cyc = 0;

  trace_ctrl #(.TICK_CYCLES(TICK), .BURST_CYCLES(BURST), .CHOP_CYCLES(CHOP)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // run-length monitor for the frozen/running pattern and chop spacing
  int run_len = 0, frz_len = 0, bad_burst = 0, bad_frz = 0, nbursts = 0, nfrz = 0;
  int last_flip = -1, bad_flip = 0, nflips = 0;
  logic watch = 0, discard = 0;
  int t0g = 0;
  always @(posedge clk) if (watch) begin
    if (!ra3_oe) begin
      if (frz_len != 0) begin
        nfrz++;
        if (frz_len != tbase * TICK) begin bad_frz++; $display("freeze %0d", frz_len); end
      end
      frz_len = 0; run_len++;
    end else begin
      if (run_len != 0) begin
        nbursts++;
        if (run_len != BURST) begin bad_burst++; $display("burst %0d at %0d (t0 %0d)", run_len, cyc, t0g); end
      end
      run_len = 0; frz_len++;
    end
    if (discard) begin run_len = 0; discard = 0; end
  end

  always @(posedge clk) if (busy && chop_flip) begin
    nflips++;
    if (!mode[0] && last_flip >= 0 && cyc - last_flip != CHOP) bad_flip++;
    last_flip = cyc;
  end

  initial begin
    repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, want, unit;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      mode = 4'(k % 4); tbase = 8'($urandom_range(0, 3)); delay = 16'($urandom_range(0, 4));
      freeze_level = 1'($urandom);
      trig_in = (k % 5 == 0);       // already high at start: needs a fresh edge
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      check(busy && store, "sampling started");
      if (mode[0] && tbase != 0) check(ra3_oe && ra3_out == freeze_level, "expansion starts frozen");
      else                       check(!ra3_oe, "simple mode runs the clock");
      watch = mode[0] && tbase != 0; run_len = 0; frz_len = 0; bad_burst = 0; bad_frz = 0;
      nbursts = 0; nfrz = 0; nflips = 0; last_flip = -1; bad_flip = 0;
      repeat (60) @(negedge clk);
      check(!triggered && busy, "no trigger without an edge");
      // lower, then raise the trigger, each while the clock runs (it is polled then only)
      do @(negedge clk); while (ra3_oe);
      trig_in = 0;
      do @(negedge clk); while (ra3_oe);
      trig_in = 1; t0 = cyc; discard = 1; t0g = cyc;
      #1 check(1'b1, "");
      if (delay == 0) want = 0;
      else if (mode[0]) want = delay * (tbase * TICK + BURST);
      else begin unit = (tbase == 0) ? 1 : tbase; want = delay * unit * TICK; end
      if (delay != 0) begin
        @(negedge clk);
        while (!done) begin
          if (!mode[0]) check(!ra3_oe, "clock runs during delay");
          @(negedge clk);
        end
      end
      else check(done, "halt at once with no delay");
      check(cyc - t0 == want, $sformatf("mode %0d tb %0d dly %0d: halt after %0d want %0d",
                                        mode, tbase, delay, cyc - t0, want));
      watch = 0;
      if (mode[0] && tbase != 0) check(bad_burst == 0 && bad_frz == 0 && nbursts > 2 && nfrz > 2,
                                       $sformatf("freeze/burst pattern (%0d bursts)", nbursts));
      if (mode[1]) check(nflips > 0 && bad_flip == 0, $sformatf("chop flips mode %0d n %0d bad %0d", mode, nflips, bad_flip));
      else         check(nflips == 0, "no chop flips");
      @(negedge clk);
      check(!busy && triggered && !store && ra3_oe && ra3_out == freeze_level, "halted and frozen");
      trig_in = 0;
      repeat (5) @(negedge clk);
    end
    // abort while waiting
    mode = 0; @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (20) @(negedge clk); abort = 1; @(negedge clk); abort = 0;
    check(!busy && ra3_oe && !store, "abort freezes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

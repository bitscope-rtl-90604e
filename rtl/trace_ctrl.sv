// trace_ctrl: the trace loop behind the 'T' (trace until trigger) command.
//
// Starts sampling (STORE high, sample clock released to run freely), polls the
// trigger pin for a rising edge, runs the post-trigger delay and then freezes
// the sample clock at `freeze_level`. The low two bits of the trace mode pick
// the loop:
//   mode[0] = 0 simple:    the clock runs continuously while waiting.
//   mode[0] = 1 timebase expansion: the clock is frozen for tbase units of
//             TICK_CYCLES, then runs a burst of BURST_CYCLES, over and over;
//             the trigger is polled during bursts only.
//   mode[1] = 1 chop:      `chop_flip` pulses to swap the channel nibbles,
//             every CHOP_CYCLES in the simple loop, once per burst with
//             timebase expansion.
// Post-trigger delay: `delay` iterations. In a timebase-expansion mode each
// iteration is one freeze-and-burst; in a simple mode each iteration runs the
// clock for max(tbase,1) units of TICK_CYCLES. A delay of 0 halts at once.
//
// Interface: `start` (one cycle, while idle) begins; `busy` is high until the
// clock is frozen; `done` pulses then and `triggered` tells that the trigger
// was seen. `abort` freezes the clock and stops at once, as any byte from the
// host does. While idle, RA3 is driven to freeze_level; ra3_out is that input
// itself, and ra3_oe says when it counts.
//
// From the document: the trace modes 0..3 (single/chop, simple/timebase
// expansion), the freeze of R13 counts followed by a ~1 us burst, the 16-bit
// post-trigger delay magnified by R13, the chop flip at about 200 kHz and the
// clock frozen only after the delay. Edge polling, the unit TICK_CYCLES and
// treating modes 4..15 by their low two bits are this design's choices.
module trace_ctrl #(
  parameter int unsigned TICK_CYCLES  = 50,   // one timebase unit, 1 us at 50 MHz
  parameter int unsigned BURST_CYCLES = 50,   // 1 us burst at 50 MHz
  parameter int unsigned CHOP_CYCLES  = 250   // 5 us between flips: 200 kHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        abort,
  input  logic [3:0]  mode,
  input  logic [7:0]  tbase,
  input  logic [15:0] delay,
  input  logic        trig_in,
  input  logic        freeze_level,
  output logic        store,
  output logic        ra3_oe,
  output logic        ra3_out,
  output logic        chop_flip,
  output logic        busy,
  output logic        done,
  output logic        triggered
);
  typedef enum logic [2:0] {T_IDLE, T_WAIT_RUN, T_WAIT_FRZ, T_DLY_RUN, T_DLY_FRZ, T_DLY_BURST} tstate_e;
  tstate_e state;

  logic        tbexp, chop;
  logic [15:0] sub;        // cycles within a unit / burst
  logic [7:0]  units;      // units left in a freeze or run
  logic [15:0] iters;      // post-trigger delay iterations left
  logic [15:0] chop_cnt;
  logic        prev;

  logic running;
  assign running = (state == T_WAIT_RUN) || (state == T_DLY_RUN) || (state == T_DLY_BURST);

  wire  trig_edge = (state == T_WAIT_RUN) && trig_in && !prev;
  wire [7:0] tb1 = (tbase == 8'd0) ? 8'd1 : tbase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      tbexp     <= 1'b0;
      chop      <= 1'b0;
      sub       <= '0;
      units     <= '0;
      iters     <= '0;
      chop_cnt  <= '0;
      prev      <= 1'b0;
      triggered <= 1'b0;
    end else if (abort) begin
      state <= T_IDLE;
    end else begin
      if (running) prev <= trig_in;
      unique case (state)
        T_IDLE: if (start) begin
          tbexp     <= mode[0];
          chop      <= mode[1];
          triggered <= 1'b0;
          prev      <= trig_in;
          sub       <= '0;
          chop_cnt  <= '0;
          units     <= tbase;
          state     <= (mode[0] && tbase != 8'd0) ? T_WAIT_FRZ : T_WAIT_RUN;
        end
        T_WAIT_FRZ: if (sub == 16'(TICK_CYCLES - 1)) begin
          sub <= '0;
          if (units == 8'd1) state <= T_WAIT_RUN;
          units <= units - 8'd1;
        end else sub <= sub + 16'd1;
        T_WAIT_RUN: begin
          if (trig_edge) begin
            triggered <= 1'b1;
            iters     <= delay;
            sub       <= '0;
            units     <= tbexp ? tbase : tb1;
            if (delay == 16'd0)                    state <= T_IDLE;
            else if (tbexp && tbase != 8'd0)       state <= T_DLY_FRZ;
            else if (tbexp)                        state <= T_DLY_BURST;
            else                                   state <= T_DLY_RUN;
          end else if (tbexp) begin
            if (sub == 16'(BURST_CYCLES - 1)) begin
              sub   <= '0;
              units <= tbase;
              if (tbase != 8'd0) state <= T_WAIT_FRZ;
            end else sub <= sub + 16'd1;
          end
        end
        T_DLY_RUN: if (sub == 16'(TICK_CYCLES - 1)) begin
          sub <= '0;
          if (units == 8'd1) begin
            units <= tb1;
            if (iters == 16'd1) state <= T_IDLE;
            iters <= iters - 16'd1;
          end else units <= units - 8'd1;
        end else sub <= sub + 16'd1;
        T_DLY_FRZ: if (sub == 16'(TICK_CYCLES - 1)) begin
          sub <= '0;
          if (units == 8'd1) state <= T_DLY_BURST;
          units <= units - 8'd1;
        end else sub <= sub + 16'd1;
        T_DLY_BURST: if (sub == 16'(BURST_CYCLES - 1)) begin
          sub   <= '0;
          units <= tbase;
          iters <= iters - 16'd1;
          if (iters == 16'd1)      state <= T_IDLE;
          else if (tbase != 8'd0)  state <= T_DLY_FRZ;
        end else sub <= sub + 16'd1;
        default: state <= T_IDLE;
      endcase

      // chop timer of the simple loop
      if (chop && !tbexp && (state == T_WAIT_RUN || state == T_DLY_RUN))
        chop_cnt <= (chop_cnt == 16'(CHOP_CYCLES - 1)) ? 16'd0 : chop_cnt + 16'd1;
    end
  end

  wire burst_end = tbexp && (sub == 16'(BURST_CYCLES - 1)) &&
                   ((state == T_WAIT_RUN && !trig_edge) || state == T_DLY_BURST);

  always_comb begin
    busy      = (state != T_IDLE);
    store     = busy;
    ra3_oe    = !running;
    ra3_out   = freeze_level;
    done      = !abort && busy &&
                ((state == T_WAIT_RUN && trig_edge && delay == 16'd0) ||
                 (state == T_DLY_RUN && sub == 16'(TICK_CYCLES - 1) && units == 8'd1 && iters == 16'd1) ||
                 (state == T_DLY_BURST && sub == 16'(BURST_CYCLES - 1) && iters == 16'd1));
    chop_flip = !abort && chop &&
                (tbexp ? burst_end
                       : ((state == T_WAIT_RUN || state == T_DLY_RUN) && chop_cnt == 16'(CHOP_CYCLES - 1)));
  end
endmodule

// sample_reader: reads one sample pair through the data multiplexers.
//
// With the RAMs in read mode, the controller learns a byte one bit at a time:
// it sets the multiplexer select lines SEL2..SEL0 to 0..7 and samples the
// logic MUX output (RA4) and the ADC MUX output (RB0) after SETTLE cycles
// each. Having collected both bytes it steps the sample clock once (RA3 low
// for STEP_CYCLES/2 cycles, then high) so that Spock's counter moves to the
// next address.
//
// Interface: `start` (one cycle, while idle) reads the sample at the current
// address; `done` pulses when logic_byte and adc_byte are valid and the step
// is over. `abort` stops at once. Timing: 8*SETTLE + STEP_CYCLES cycles.
//
// From the document: the 8:1 MUXes U4/U5 on RB0/RA4 addressed by SEL0..2,
// RAM read back under STORE/!READ low, the zz-clk as the address clock.
// The settle and step timing are this design's choices.
module sample_reader #(
  parameter int unsigned SETTLE      = 2,   // cycles per select value
  parameter int unsigned STEP_CYCLES = 8    // cycles of the clock step, even
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       abort,
  input  logic       logic_y,     // RA4
  input  logic       adc_y,       // RB0
  output logic [2:0] sel,
  output logic       ra3_oe,
  output logic       ra3_out,
  output logic       busy,
  output logic       done,
  output logic [7:0] logic_byte,
  output logic [7:0] adc_byte
);
  typedef enum logic [1:0] {R_IDLE, R_BITS, R_STEP} rstate_e;
  rstate_e state;
  logic [7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= R_IDLE;
      sel        <= '0;
      cnt        <= '0;
      logic_byte <= '0;
      adc_byte   <= '0;
    end else if (abort) begin
      state <= R_IDLE;
    end else begin
      unique case (state)
        R_IDLE: if (start) begin
          state <= R_BITS;
          sel   <= '0;
          cnt   <= '0;
        end
        R_BITS: if (cnt == 8'(SETTLE - 1)) begin
          logic_byte[sel] <= logic_y;
          adc_byte[sel]   <= adc_y;
          cnt             <= '0;
          if (sel == 3'd7) state <= R_STEP;
          sel <= sel + 3'd1;
        end else cnt <= cnt + 8'd1;
        R_STEP: if (cnt == 8'(STEP_CYCLES - 1)) state <= R_IDLE;
                else cnt <= cnt + 8'd1;
        default: state <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    busy    = (state != R_IDLE);
    ra3_oe  = busy;
    ra3_out = (state == R_STEP) && (cnt >= 8'(STEP_CYCLES / 2));
    done    = !abort && (state == R_STEP) && (cnt == 8'(STEP_CYCLES - 1));
  end
endmodule

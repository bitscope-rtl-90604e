// spock: the PLD ("Spock") of the capture engine.
//
// Two jobs, both clocked by the sample clock zz-clk (here: a clock enable
// `zz_tick` on the master clock):
//  * Address generation. A 16-bit counter addresses the sample RAMs. The RAM
//    address is {PG1, counter[13:0]}: PG1 picks the upper or lower 16K half of
//    each 32Kx8 RAM, and the RAM aliases in all four 16K regions of the count.
//  * Triggering. An 8-bit comparator checks the logic bus or the ADC bus
//    against the PATTERN register; bits whose MASK bit is 1 are ignored. The
//    TRIG7 output is either logic bit 7 (DD7), the comparator match, EVENT1
//    (prescaler) or EVENT2 (AC-coupled ADC edge); it replaces bit 7 of the
//    logic data on its way to the RAM and the data MUX.
//
// Shift mode (shift_mode = 1): on each tick the 36-bit chain
// {option[3:0], mask, pattern, counter} shifts up by one, shift_in entering at
// counter bit 0; shift_out is counter bit 15, so the counter leaves MSB first
// while new bits arrive. Shifting the five bytes R7,R6,R5,R4,R3 MSB first (40
// bits) leaves counter = {R4,R3}, pattern = R5, mask = R6, option = R7[3:0];
// the top four bits of R7 fall off the end of the chain.
// Count mode (shift_mode = 0): on each tick the counter increments; the
// comparator and TRIG7 are combinational.
//
// From the document: the five loadable registers, the 16-bit counter, the
// pattern/mask rule, the option bits and the TRIG7 choices, bits moving from
// the top of the counter into the comparator registers, the counter shifted
// out on SEL0. This design's choices: the chain order beyond the counter, the
// option bit 0 polarity (1 = ADC bus), the TRIG7 code with bit 2 as MSB, and
// counting in read mode as well as in store mode.
module spock
  import bitscope_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        zz_tick,      // one sample-clock edge
  input  logic        shift_mode,   // SHIFT/!COUNT (RB4)
  input  logic        shift_in,     // A-DATA (RB0) in shift mode
  output logic        shift_out,    // to SEL0 (RB1) in shift mode
  input  logic [7:0]  logic_bus,    // logic data bus (POD latch or RAM)
  input  logic [7:0]  adc_bus,      // ADC data bus (ADC or RAM)
  input  logic        event1,       // prescaler output
  input  logic        event2,       // AC-coupled ADC edge
  output logic        trig_match,
  output logic        trig7,
  output logic        pg1,
  output logic [14:0] ram_addr,
  output logic [15:0] counter,
  output logic [7:0]  pattern,
  output logic [7:0]  mask,
  output logic [3:0]  option
);
  logic [7:0] src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter <= '0;
      pattern <= '0;
      mask    <= '1;
      option  <= '0;
    end else if (zz_tick) begin
      if (shift_mode)
        {option, mask, pattern, counter} <= {option[2:0], mask, pattern, counter, shift_in};
      else
        counter <= counter + 16'd1;
    end
  end

  always_comb begin
    src        = option[OPT_TRIG_ANALOG] ? adc_bus : logic_bus;
    trig_match = &(~(src ^ pattern) | mask);
    unique case (trig7_sel_e'({option[OPT_T7_MSB], option[OPT_T7_LSB]}))
      T7_DD7:    trig7 = logic_bus[7];
      T7_MATCH:  trig7 = trig_match;
      T7_EVENT1: trig7 = event1;
      T7_EVENT2: trig7 = event2;
      default:   trig7 = logic_bus[7];
    endcase
  end

  assign shift_out = counter[15];
  assign pg1       = option[OPT_PG1];
  assign ram_addr  = {pg1, counter[13:0]};
endmodule

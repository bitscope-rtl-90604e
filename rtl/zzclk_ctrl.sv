// zzclk_ctrl: glitch-free control of the sample clock zz-clk.
//
// The controller's pin RA3 has three states: driven high, driven low, or
// released (three-stated), which lets the clock run freely. A flip-flop
// re-times the pin on the clean clock edge, so the clock seen by Spock, the
// ADC and the RAMs never carries a runt pulse. In this model the sample clock
// is a one-cycle enable `zz_tick` on the master clock:
//  * released: zz_tick is high every master cycle (free-running);
//  * driven:   zz_tick pulses once, one cycle after the pin has gone from
//              low to high (single step); a held level gives no ticks.
// zz_level is the level the frozen clock sits at (1 while free-running); the
// POD latch is transparent while it is high.
//
// The three pin states and the re-timing flip-flop come from the document
// (U6A clocked by the frequency doubler U3D). Modelling the clock as an enable
// on one master clock, and the one-cycle latency, are this design's choices.
module zzclk_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic ra3_oe,     // 1: controller drives RA3
  input  logic ra3_out,    // level driven on RA3
  output logic zz_tick,
  output logic zz_level
);
  logic drv_q, val_q, last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drv_q  <= 1'b1;
      val_q  <= 1'b1;
      last_q <= 1'b1;
    end else begin
      drv_q  <= ra3_oe;
      val_q  <= ra3_out;
      last_q <= drv_q ? val_q : 1'b1;
    end
  end

  assign zz_tick  = drv_q ? (val_q & ~last_q) : 1'b1;
  assign zz_level = drv_q ? val_q : 1'b1;
endmodule

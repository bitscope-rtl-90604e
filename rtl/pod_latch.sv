// pod_latch: latching buffer for the eight logic inputs of the POD.
//
// Holds the logic levels that are written into the logic sample RAM. The
// latch is transparent while the sample clock is frozen high and captures
// on every sample-clock tick; while the clock is frozen low it holds. An
// output enable (driven by STORE) lets the RAM drive the bus when it is read;
// while disabled the output reads zero, which the bus multiplexer in the top
// level never selects. Registered on the master clock.
//
// From the document: U12 (74AC573) latches the 8 logic levels for the RAM and
// is transparent while zz-clk is halted high; input pull-downs make an open
// input read 0. Modelling the transparent phase as a register reloaded every
// master cycle (no latch in the design) is this design's choice.
module pod_latch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       zz_tick,
  input  logic       zz_level,
  input  logic       oe,
  input  logic [7:0] d,
  output logic [7:0] q
);
  logic [7:0] held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   held <= '0;
    else if (zz_tick || zz_level) held <= d;
  end

  assign q = oe ? held : 8'h00;
endmodule

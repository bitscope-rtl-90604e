// flash_adc: behavioural model of the 8-bit flash ADC (MC10319 footprint).
//
// This is a behavioural model of an analog part: the input is a signed
// integer in millivolts. On each sample-clock tick the input is converted to
// code = floor((vin - (CENTER_MV - SPAN_MV/2)) * 256 / SPAN_MV), limited to
// 0..255, and held. With output enable low (!STORE drives the ADC's !OE) the
// outputs are off; in this two-state model they then read zero and the bus
// multiplexer in the top level takes the RAM data instead.
//
// From the document: 8-bit output, sample clock = zz-clk, !OE from STORE,
// 2 V span centred at 1 V for the nominal part. The straight-binary transfer
// function is this design's choice.
module flash_adc #(
  parameter int SPAN_MV   = 2000,
  parameter int CENTER_MV = 1000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               zz_tick,
  input  logic               oe,
  input  logic signed [15:0] vin_mv,
  output logic [7:0]         d
);
  logic [7:0] code_q;
  logic signed [31:0] lvl;

  always_comb begin
    lvl = ((32'(vin_mv) - (CENTER_MV - SPAN_MV / 2)) * 256) / SPAN_MV;
    if (32'(vin_mv) < CENTER_MV - SPAN_MV / 2) lvl = 0;
    if (lvl > 255) lvl = 255;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       code_q <= '0;
    else if (zz_tick) code_q <= lvl[7:0];
  end

  assign d = oe ? code_q : 8'h00;
endmodule

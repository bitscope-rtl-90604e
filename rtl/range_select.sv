// range_select: behavioural model of the range buffer (U14), the range
// multiplexer (U18) with its three resistor attenuators, and the gain stage
// (U15).
//
// This is a behavioural model of an analog part: voltages are signed integer
// millivolts. RNG1..RNG0 (controller pins RA1..RA0) select the gain:
//   0: x4.583 (gain stage)   1: x1.000   2: x0.500   3: x0.190 (1/5.273)
// The result is limited to the +/-5 V analog supply. Combinational.
//
// From the document: the four gains and their order, the unity-gain buffer
// ahead of the attenuators, the +/-5 V analog supplies. Limiting at the
// supply rails is this design's simplification of op-amp saturation.
module range_select (
  input  logic signed [15:0] in_mv,
  input  logic [1:0]         rng,
  output logic signed [15:0] out_mv
);
  localparam int RAIL_MV = 5000;

  logic signed [31:0] gain_x1000, prod;

  always_comb begin
    unique case (rng)
      2'd0: gain_x1000 = 32'sd4583;
      2'd1: gain_x1000 = 32'sd1000;
      2'd2: gain_x1000 = 32'sd500;
      default: gain_x1000 = 32'sd190;
    endcase
    prod = (32'(in_mv) * gain_x1000) / 1000;
    if (prod > RAIL_MV)       out_mv = 16'(RAIL_MV);
    else if (prod < -RAIL_MV) out_mv = -16'(RAIL_MV);
    else                      out_mv = 16'(prod);
  end
endmodule

// analog_source_mux: behavioural model of the analog source selector (U17,
// a dual 4:1 analog multiplexer) and the POD analog input attenuators.
//
// This is a behavioural model of an analog part: voltages are signed integer
// millivolts. Of the four inputs, CH-A/B picks A or B and PG1 picks the BNC
// pair or the POD pair: {pg1, chab} = 00 BNC A, 01 BNC B, 10 POD A, 11 POD B.
// The POD inputs pass through a fixed attenuator of 4.830 first. The second
// half of the multiplexer lights one of four channel LEDs while sampling
// (led_en), with the same select. Combinational.
//
// From the document: four channels, selection by CH-A/B (a controller pin)
// and PG1 (a Spock option bit), POD attenuation factor 4.830, LEDs on the
// spare multiplexer. The order of the select codes is this design's choice.
module analog_source_mux (
  input  logic signed [15:0] bnc_a_mv,
  input  logic signed [15:0] bnc_b_mv,
  input  logic signed [15:0] pod_a_mv,
  input  logic signed [15:0] pod_b_mv,
  input  logic               chab,
  input  logic               pg1,
  input  logic               led_en,
  output logic signed [15:0] out_mv,
  output logic [3:0]         led
);
  localparam int POD_ATTEN_X1000 = 4830;

  logic signed [31:0] pod_sel;

  always_comb begin
    pod_sel = chab ? 32'(pod_b_mv) : 32'(pod_a_mv);
    if (!pg1) out_mv = chab ? bnc_b_mv : bnc_a_mv;
    else      out_mv = 16'((pod_sel * 1000) / POD_ATTEN_X1000);
    led = led_en ? (4'b0001 << {pg1, chab}) : 4'b0000;
  end
endmodule

// adc_buffer: behavioural model of the ADC driver (U16) and the AC-coupled
// edge signal taken from the ADC input.
//
// This is a behavioural model of an analog part: voltages are signed integer
// millivolts. Diode clamps limit the input to +/-600 mV; the buffer amplifies
// by 1.667 (so +/-0.6 V becomes +/-1.0 V) and adds the offset that centres
// the signal on the ADC span (CENTER_MV, 1000 mV for the MC10319). `edge_out`
// is high while the AC-coupled signal is above zero; it feeds Spock's EVENT2
// input for edge counting. Combinational.
//
// From the document: the clamp at +/-0.6 V, the gain of 1.667, the offset
// adjustment to the ADC span, C27 taking the AC part of the signal for edge
// counting in Spock. Treating that signal as a zero-crossing comparator is
// this design's choice.
module adc_buffer #(
  parameter int CENTER_MV = 1000
) (
  input  logic signed [15:0] in_mv,
  output logic signed [15:0] out_mv,
  output logic               edge_out
);
  localparam int CLAMP_MV = 600;

  logic signed [31:0] clamped;

  always_comb begin
    if (32'(in_mv) > CLAMP_MV)       clamped = CLAMP_MV;
    else if (32'(in_mv) < -CLAMP_MV) clamped = -CLAMP_MV;
    else                        clamped = 32'(in_mv);
    out_mv   = 16'((clamped * 1667) / 1000 + CENTER_MV);
    edge_out = (clamped > 0);
  end
endmodule

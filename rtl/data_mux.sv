// data_mux: 8:1 bit multiplexer between a sample data bus and a controller pin.
//
// The controller reads a byte from the logic bus (U5, into RA4) or from the
// ADC bus (U4, into RB0) one bit at a time, stepping the select lines
// SEL2..SEL0 (RB3..RB1) through 0..7. With select 7 on the logic MUX the pin
// sees Spock's TRIG7 output, which is how the trace loop polls for a trigger.
// Combinational.
//
// From the document: 8:1 MUX devices U4 and U5 addressed by SEL0..SEL2.
module data_mux (
  input  logic [7:0] bus,
  input  logic [2:0] sel,
  output logic       y
);
  assign y = bus[sel];
endmodule

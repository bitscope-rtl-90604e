// prescaler: divide-by-64 frequency prescaler (EVENT1 source).
//
// A 6-bit counter clocked by the high-frequency input; its MSB is a square
// wave at f/64 that Spock can route to TRIG7 and on to the controller's
// counter input for frequency measurement. `enable` models switch S3, which
// puts the prescaler in circuit; when off the output holds low.
//
// From the document: a 1 GHz prescaler chip (MC12073) giving an f/64 square
// wave into a spare clock input of Spock, switched in by S3. Building it as
// a binary counter is this design's choice.
module prescaler (
  input  logic rf_in,
  input  logic rst_n,
  input  logic enable,
  output logic out
);
  logic [5:0] cnt;

  always_ff @(posedge rf_in or negedge rst_n) begin
    if (!rst_n)      cnt <= '0;
    else if (enable) cnt <= cnt + 6'd1;
  end

  assign out = enable & cnt[5];
endmodule

// sample_sram: one 32K x 8 static RAM sample buffer.
//
// The capture engine has two: one stores ADC samples, the other the logic
// levels. While STORE/!READ is high the byte on wdata is written at addr on
// each sample-clock tick; while it is low the RAM drives rdata (asynchronous
// read, as an SRAM chip does) and nothing is written.
//
// The size (32K x 8) and the STORE/!READ control come from the document; the
// write on the tick of the sample clock is this design's model of the chip's
// write strobe.
module sample_sram #(
  parameter int unsigned ADDR_W = 15     // 32K words
) (
  input  logic              clk,
  input  logic              zz_tick,
  input  logic              store,       // STORE/!READ (RB7)
  input  logic [ADDR_W-1:0] addr,
  input  logic [7:0]        wdata,
  output logic [7:0]        rdata
);
  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (store && zz_tick) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule

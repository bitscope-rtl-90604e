// uart_tx: 8N1 asynchronous serial transmitter.
//
// Sends one start bit (0), eight data bits LSB first and one stop bit (1).
// A byte is accepted when in_valid and in_ready are both high; in_ready is
// high only while the line is idle. Each bit lasts `div` clock cycles, taken
// at the moment the byte is accepted, so one instance can serve links of
// different speeds. The line idles high.
//
// The serial format and the rates it is used at (19200 baud to the host,
// 9600 baud to a POD) follow the description of the serial interface; the
// document implements the UART in firmware, and building it as a hardware
// shift register with a valid/ready handshake is this design's choice.
module uart_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] div,        // clock cycles per bit, at least 2
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_ready,
  output logic        txd
);
  logic [9:0]  shreg;
  logic [3:0]  bits_left;
  logic [15:0] cnt;
  logic [15:0] div_q;

  assign in_ready = (bits_left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      div_q     <= 16'd2;
      txd       <= 1'b1;
    end else if (bits_left == 4'd0) begin
      txd <= 1'b1;
      if (in_valid) begin
        shreg     <= {1'b1, in_data, 1'b0};
        bits_left <= 4'd10;
        div_q     <= div;
        cnt       <= div - 16'd1;
        txd       <= 1'b0;
      end
    end else if (cnt != 16'd0) begin
      cnt <= cnt - 16'd1;
    end else begin
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
      cnt       <= div_q - 16'd1;
      txd       <= (bits_left == 4'd1) ? 1'b1 : shreg[1];
    end
  end
endmodule

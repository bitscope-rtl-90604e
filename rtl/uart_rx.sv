// uart_rx: 8N1 asynchronous serial receiver.
//
// The input is synchronised with two flip-flops. A falling edge on the idle
// line starts a frame; the start bit is checked at its middle, then each data
// bit is sampled `div` cycles later (LSB first) and the stop bit last. A frame
// with a good stop bit gives a one-cycle out_valid pulse with the byte on
// out_data; a bad start bit drops the frame. A bad stop bit drops it too,
// except that a frame of all zeros without a stop bit is a line break and is
// delivered as byte 00; after any bad stop bit the receiver waits for the
// line to return high before it looks for the next start bit. `start` pulses
// when a start bit is detected, so a controller can react to a byte before it
// has fully arrived.
//
// The frame format follows the document's serial interface (8 data bits, no
// handshaking), and so does the break: byte 00 is the reset code and a break
// must reach it. Mid-bit sampling and the framing-error rule are this
// design's choices.
module uart_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] div,        // clock cycles per bit, at least 2
  input  logic        rxd,
  output logic        start,
  output logic        out_valid,
  output logic [7:0]  out_data
);
  typedef enum logic [2:0] {IDLE, START, DATA, STOP, WAIT_HIGH} state_e;
  state_e      state;
  logic [1:0]  sync;
  logic [15:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shreg;

  wire line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      start     <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      out_valid <= 1'b0;
      start     <= 1'b0;
      unique case (state)
        IDLE: if (!line) begin
          state <= START;
          start <= 1'b1;
          cnt   <= {1'b0, div[15:1]} - 16'd1;
        end
        START: if (cnt != 16'd0) cnt <= cnt - 16'd1;
               else if (line) state <= IDLE;        // glitch, not a start bit
               else begin
                 state <= DATA;
                 bitn  <= 3'd0;
                 cnt   <= div - 16'd1;
               end
        DATA: if (cnt != 16'd0) cnt <= cnt - 16'd1;
              else begin
                shreg <= {line, shreg[7:1]};
                cnt   <= div - 16'd1;
                if (bitn == 3'd7) state <= STOP;
                bitn  <= bitn + 3'd1;
              end
        STOP: if (cnt != 16'd0) cnt <= cnt - 16'd1;
              else begin
                state <= line ? IDLE : WAIT_HIGH;
                if (line || shreg == 8'h00) begin
                  out_valid <= 1'b1;
                  out_data  <= shreg;
                end
              end
        WAIT_HIGH: if (line) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule

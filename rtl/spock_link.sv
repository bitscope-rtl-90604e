// spock_link: shift-mode sequencer that loads Spock and reads its counter.
//
// Drives the three lines the controller uses to talk to Spock in shift mode:
// SHIFT/!COUNT high, one data bit on A-DATA, and single steps of the sample
// clock through RA3 (low for BIT_CYCLES/2 cycles, then high for BIT_CYCLES/2;
// the clock control turns each low-to-high step into one tick). Forty bits of
// `load_data` are sent MSB first, one per step. Just before each of the first
// 16 steps the line from Spock (counter MSB) is sampled, so `captured` ends up
// holding the counter value Spock had at the start.
//
// With `recirc` = 0 the five bytes {R7,R6,R5,R4,R3} in load_data are loaded
// ('>' command): the old counter is read out and replaced. With `recirc` = 1
// only the top 24 bits of load_data (R7,R6,R5) are used and the last 16 bits
// sent are the counter bits just captured, so the counter is read ('<'
// command) and every Spock register keeps its value.
//
// Interface: `start` (one cycle, while idle) begins a sequence; `busy` is
// high during it; `done` pulses in its last cycle. `abort` stops at once.
// Timing: 40 * BIT_CYCLES cycles.
//
// From the document: 5 bytes from R3..R7 shifted in through RB0 while the
// 16-bit counter is shifted out through RB1, SHIFT/!COUNT on RB4, zz-clk as
// the shift clock. Bit order, the step timing and the read-back by
// re-circulation are this design's choices.
module spock_link #(
  parameter int unsigned BIT_CYCLES = 8   // master cycles per shifted bit, even, >= 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        abort,
  input  logic        recirc,
  input  logic [39:0] load_data,
  input  logic        shift_out,    // Spock counter MSB (RB1)
  output logic        shift_mode,   // SHIFT/!COUNT (RB4)
  output logic        shift_in,     // A-DATA (RB0)
  output logic        ra3_oe,
  output logic        ra3_out,
  output logic        busy,
  output logic        done,
  output logic [15:0] captured
);
  localparam int unsigned PW = $clog2(BIT_CYCLES);
  localparam logic [PW-1:0] PH_HALF = PW'(BIT_CYCLES / 2);
  localparam logic [PW-1:0] PH_CAPT = PW'(BIT_CYCLES / 2 - 1);
  localparam logic [PW-1:0] PH_LAST = PW'(BIT_CYCLES - 1);

  logic [5:0]  bitn;
  logic [5:0]  rbit;       // 39 - bitn: index of the bit now on shift_in
  logic [PW-1:0] ph;
  logic [39:0] data_q;
  logic        recirc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      bitn     <= '0;
      ph       <= '0;
      data_q   <= '0;
      recirc_q <= 1'b0;
      captured <= '0;
    end else if (abort) begin
      busy <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        bitn     <= '0;
        ph       <= '0;
        data_q   <= load_data;
        recirc_q <= recirc;
      end
    end else begin
      if (ph == PH_CAPT && bitn < 6'd16) captured <= {captured[14:0], shift_out};
      if (ph == PH_LAST) begin
        ph   <= '0;
        bitn <= bitn + 6'd1;
        if (bitn == 6'd39) busy <= 1'b0;
      end else begin
        ph <= ph + 1'b1;
      end
    end
  end

  always_comb begin
    shift_mode = busy;
    ra3_oe     = busy;
    ra3_out    = busy && (ph >= PH_HALF);
    rbit       = 6'd39 - bitn;
    if (recirc_q && bitn >= 6'd24) shift_in = captured[rbit[3:0]];
    else                           shift_in = data_q[rbit];
    done       = busy && !abort && (ph == PH_LAST) && (bitn == 6'd39);
  end
endmodule

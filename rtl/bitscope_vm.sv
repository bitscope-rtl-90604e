// bitscope_vm: the BitScope virtual machine, the controller of the capture
// engine ("Picard").
//
// The machine executes byte codes straight from the serial port; there is no
// program memory and no syntax, every byte is a complete instruction. It owns
// the register set R0..R19 (see bitscope_pkg) and drives the hardware:
//  * register commands: '[' clear R0, '0'..'9','a'..'f' add the nibble to R0
//    then swap R0's nibbles, ']' swap, '@' R1=R0, '#' R2=R0, 's' R(R1)=R0,
//    'l' R0=R(R2), 'n' R1+1, '+'/'-' R(R1)+/-1, 'u' R9,R10 = R3,R4;
//  * printing: 'p' CR, two hex digits of R(R1), CR; '?' CR, the 8-character
//    ID, CR; byte 00 resets every register and prints the ID the same way;
//  * Spock: '>' loads R3..R7 into Spock; '<' reads the counter into R9,R10;
//  * 'T': runs the trace loop (trace_ctrl) with the mode in R8[3:0], timebase
//    R13 and delay R12:R11, then reads the frozen counter into R9,R10 and
//    prints CR, four hex digits, CR;
//  * 'S': loads Spock with the address R10:R9 (and R5..R7), reads R15 samples
//    (0 means 256) through the data MUXes and prints them as CSV: CR, then per
//    sample four hex digits (logic byte, ADC byte) followed by ',' or, after
//    every 16th and after the last, CR; R10:R9 then points past the last;
//  * POD: 'x' sends R18 to the POD at POD_DIV cycles per bit, waits for a
//    byte back into R19 and sends it to the host; '|' sends R18 at the host
//    rate and then connects the POD input to the host output (pass_active).
// Every printable byte received (0x20..0x7e) is echoed before it executes;
// other unlisted byte codes do nothing. A start bit from the host aborts any
// long operation (sampling, dumps, POD waits, printing); the clock is frozen
// and the new byte is executed.
//
// Port A (RA0..RA3) is the low nibble of R14, or its high nibble while the
// chop loop has swapped them: RA1..RA0 range, RA2 channel A/B, RA3 the level
// the frozen sample clock sits at. R8[7:4] chooses the multiplexer line polled
// for the trigger: R8[7] picks the ADC MUX (RB0) or the logic MUX (RA4),
// R8[6:4] the select value (7 on the logic MUX is Spock's TRIG7).
//
// From the document: the register set, the command codes and what each does,
// echoing, abort by any byte, the reset vector, the trace modes, the dump
// layout, the POD commands. This design's choices: a hardware state machine in
// place of firmware, register numbers beyond R19 read as 0 and ignore writes,
// printing as lower-case hex framed by CR, 'S' starting at R10:R9, the ID text,
// and the meaning of R8[7].
module bitscope_vm
  import bitscope_pkg::*;
#(
  parameter logic [63:0] ID           = "BitScope",
  parameter int unsigned HOST_DIV     = 2604,  // 50 MHz / 19200 baud
  parameter int unsigned POD_DIV      = 5208,  // 50 MHz / 9600 baud
  parameter int unsigned TICK_CYCLES  = 50,
  parameter int unsigned BURST_CYCLES = 50,
  parameter int unsigned CHOP_CYCLES  = 250,
  parameter int unsigned LINK_BIT_CYCLES = 8,
  parameter int unsigned READ_SETTLE  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // host serial link (bytes)
  input  logic        rx_start,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  input  logic        tx_ready,
  output logic        pass_active,   // host output follows pod_io1
  // POD I/O
  input  logic        pod_io1,
  output logic        pod_io2,
  // Spock and sample path
  output logic        shift_mode,    // RB4
  output logic        shift_in,      // RB0 in shift mode
  input  logic        shift_out,     // RB1 in shift mode
  output logic        store,         // RB7
  output logic [2:0]  sel,           // RB3..RB1 in count mode
  input  logic        logic_y,       // RA4
  input  logic        adc_y,         // RB0 in count mode
  output logic        ra3_oe,
  output logic        ra3_out,
  output logic [2:0]  porta          // RA2..RA0: CH-A/B, RNG1, RNG0
);
  typedef enum logic [4:0] {
    S_IDLE, S_ECHO, S_EXEC, S_PRINT, S_LINK, S_TRACE, S_TRACE_PRINT,
    S_DUMP_HEAD, S_DUMP_GO, S_DUMP_WAIT, S_DUMP_END,
    S_XCHG_TX, S_XCHG_RX, S_PASS_TX, S_PASS_WAIT, S_PASS
  } vstate_e;

  vstate_e    state, ret;
  logic [7:0] regs [NUM_REGS];
  logic [7:0] cmd;
  logic       pend_valid;
  logic [7:0] pend_data;
  logic       alt;                  // channel nibbles swapped by chop

  // print buffer
  logic [7:0] pbuf [10];
  logic [3:0] plen, pidx;

  // dump bookkeeping
  logic [8:0] dump_left, dump_total;
  logic [3:0] dump_col;

  // sub-engines
  logic        link_start, link_recirc, link_busy, link_done, link_get;
  logic [39:0] link_data;
  logic [15:0] link_cap;
  logic        link_ra3_oe, link_ra3_out;
  logic        tr_start, tr_busy, tr_done, tr_store, tr_oe, tr_out, tr_flip;
  logic        rd_start, rd_busy, rd_done, rd_oe, rd_out;
  logic [2:0]  rd_sel;
  logic [7:0]  rd_logic, rd_adc;
  logic        pod_tx_valid, pod_tx_ready, pod_rx_valid, pod_fast;
  logic [7:0]  pod_rx_data;
  logic        abort;
  logic [1:0]  store_hold;    // keeps STORE up until the clock freeze has taken effect

  wire [7:0] r1    = regs[R_PTR];
  wire [7:0] r2    = regs[R_SRC];
  wire [7:0] chan  = regs[R_CHAN];
  wire [3:0] pa    = alt ? chan[7:4] : chan[3:0];
  wire [7:0] at_r1 = (r1 < 8'(NUM_REGS)) ? regs[r1[4:0]] : 8'h00;
  wire [7:0] at_r2 = (r2 < 8'(NUM_REGS)) ? regs[r2[4:0]] : 8'h00;
  wire [7:0] nib_sum = regs[R_IN] + {4'd0, nibble_val(cmd)};
  wire [15:0] dump_addr = {regs[R_CNT_H], regs[R_CNT_L]};

  // Long operations are aborted by the start bit of a new host byte.
  assign abort = rx_start && !(state inside {S_IDLE, S_ECHO, S_EXEC});

  spock_link #(.BIT_CYCLES(LINK_BIT_CYCLES)) u_link (
    .clk, .rst_n, .start(link_start), .abort, .recirc(link_recirc),
    .load_data(link_data), .shift_out, .shift_mode, .shift_in,
    .ra3_oe(link_ra3_oe), .ra3_out(link_ra3_out), .busy(link_busy),
    .done(link_done), .captured(link_cap));

  trace_ctrl #(.TICK_CYCLES(TICK_CYCLES), .BURST_CYCLES(BURST_CYCLES),
               .CHOP_CYCLES(CHOP_CYCLES)) u_trace (
    .clk, .rst_n, .start(tr_start), .abort, .mode(regs[R_TRACE][3:0]),
    .tbase(regs[R_TBASE]), .delay({regs[R_DLY_H], regs[R_DLY_L]}),
    .trig_in(regs[R_TRACE][7] ? adc_y : logic_y), .freeze_level(pa[3]),
    .store(tr_store), .ra3_oe(tr_oe), .ra3_out(tr_out), .chop_flip(tr_flip),
    .busy(tr_busy), .done(tr_done), .triggered());

  sample_reader #(.SETTLE(READ_SETTLE), .STEP_CYCLES(LINK_BIT_CYCLES)) u_reader (
    .clk, .rst_n, .start(rd_start), .abort, .logic_y, .adc_y, .sel(rd_sel),
    .ra3_oe(rd_oe), .ra3_out(rd_out), .busy(rd_busy), .done(rd_done),
    .logic_byte(rd_logic), .adc_byte(rd_adc));

  uart_tx u_pod_tx (
    .clk, .rst_n, .div(pod_fast ? 16'(HOST_DIV) : 16'(POD_DIV)),
    .in_valid(pod_tx_valid), .in_data(regs[R_POD_TX]), .in_ready(pod_tx_ready),
    .txd(pod_io2));

  uart_rx u_pod_rx (
    .clk, .rst_n, .div(16'(POD_DIV)), .rxd(pod_io1), .start(),
    .out_valid(pod_rx_valid), .out_data(pod_rx_data));

  // Pins shared by the engines
  always_comb begin
    if (tr_busy)        begin ra3_oe = tr_oe;       ra3_out = tr_out;       end
    else if (link_busy) begin ra3_oe = link_ra3_oe; ra3_out = link_ra3_out; end
    else if (rd_busy)   begin ra3_oe = rd_oe;       ra3_out = rd_out;       end
    else                begin ra3_oe = 1'b1;        ra3_out = pa[3];        end
    sel   = rd_busy ? rd_sel : regs[R_TRACE][6:4];
    store = tr_store | store_hold[0];
    porta = pa[2:0];
    pass_active  = (state == S_PASS);
    tx_valid     = (state == S_ECHO) || (state == S_PRINT);
    tx_data      = (state == S_ECHO) ? cmd : pbuf[pidx];
    pod_tx_valid = (state == S_XCHG_TX) || (state == S_PASS_TX);
    pod_fast     = (state == S_PASS_TX) || (state == S_PASS_WAIT);
  end

  function automatic logic printable(input logic [7:0] c);
    return c >= 8'h20 && c <= 8'h7e;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ret        <= S_IDLE;
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
      for (int i = 0; i < 10; i++) pbuf[i] <= '0;
      cmd        <= '0;
      pend_valid <= 1'b0;
      pend_data  <= '0;
      alt        <= 1'b0;
      plen       <= '0;
      pidx       <= '0;
      dump_left  <= '0;
      dump_total <= '0;
      dump_col   <= '0;
      link_start <= 1'b0;
      link_recirc <= 1'b0;
      link_data  <= '0;
      link_get   <= 1'b0;
      tr_start   <= 1'b0;
      rd_start   <= 1'b0;
      store_hold <= '0;
    end else begin
      link_start <= 1'b0;
      tr_start   <= 1'b0;
      rd_start   <= 1'b0;
      if (rx_valid) begin
        pend_valid <= 1'b1;
        pend_data  <= rx_data;
      end
      if (tr_flip) alt <= ~alt;
      store_hold <= (tr_busy && (tr_done || abort)) ? 2'b11 : {1'b0, store_hold[1]};

      if (abort) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (pend_valid && !rx_valid) begin
            pend_valid <= 1'b0;
            cmd        <= pend_data;
            state      <= printable(pend_data) ? S_ECHO : S_EXEC;
          end
          S_ECHO: if (tx_ready) state <= S_EXEC;
          S_PRINT: if (tx_ready) begin
            if (pidx == plen - 4'd1) state <= ret;
            pidx <= pidx + 4'd1;
          end
          S_EXEC: begin
            state <= S_IDLE;
            pidx  <= '0;
            if (is_nibble_cmd(cmd)) begin
              regs[R_IN] <= {nib_sum[3:0], nib_sum[7:4]};
            end else begin
              unique case (cmd)
                C_RESET: begin
                  for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
                  alt <= 1'b0;
                  pbuf[0] <= CHAR_CR;
                  for (int i = 0; i < 8; i++) pbuf[1+i] <= ID[63-8*i -: 8];
                  pbuf[9] <= CHAR_CR;
                  plen  <= 4'd10;
                  ret   <= S_IDLE;
                  state <= S_PRINT;
                end
                C_ID: begin
                  pbuf[0] <= CHAR_CR;
                  for (int i = 0; i < 8; i++) pbuf[1+i] <= ID[63-8*i -: 8];
                  pbuf[9] <= CHAR_CR;
                  plen  <= 4'd10;
                  ret   <= S_IDLE;
                  state <= S_PRINT;
                end
                C_CLR:   regs[R_IN] <= '0;
                C_SWAP:  regs[R_IN] <= {regs[R_IN][3:0], regs[R_IN][7:4]};
                C_LDPTR: regs[R_PTR] <= regs[R_IN];
                C_LDSRC: regs[R_SRC] <= regs[R_IN];
                C_STORE: if (r1 < 8'(NUM_REGS)) regs[r1[4:0]] <= regs[R_IN];
                C_LOAD:  regs[R_IN] <= at_r2;
                C_NEXT:  regs[R_PTR] <= r1 + 8'd1;
                C_INC:   if (r1 < 8'(NUM_REGS)) regs[r1[4:0]] <= at_r1 + 8'd1;
                C_DEC:   if (r1 < 8'(NUM_REGS)) regs[r1[4:0]] <= at_r1 - 8'd1;
                C_UPDATE: begin
                  regs[R_CNT_L] <= regs[R_PRE_L];
                  regs[R_CNT_H] <= regs[R_PRE_H];
                end
                C_PRINT: begin
                  pbuf[0] <= CHAR_CR;
                  pbuf[1] <= hex_ascii(at_r1[7:4]);
                  pbuf[2] <= hex_ascii(at_r1[3:0]);
                  pbuf[3] <= CHAR_CR;
                  plen  <= 4'd4;
                  ret   <= S_IDLE;
                  state <= S_PRINT;
                end
                C_PROG: begin
                  link_data   <= {regs[R_OPT], regs[R_MASK], regs[R_TRIG],
                                  regs[R_PRE_H], regs[R_PRE_L]};
                  link_recirc <= 1'b0;
                  link_get    <= 1'b0;
                  link_start  <= 1'b1;
                  ret         <= S_IDLE;
                  state       <= S_LINK;
                end
                C_GETCNT: begin
                  link_data   <= {regs[R_OPT], regs[R_MASK], regs[R_TRIG], 16'h0000};
                  link_recirc <= 1'b1;
                  link_get    <= 1'b1;
                  link_start  <= 1'b1;
                  ret         <= S_IDLE;
                  state       <= S_LINK;
                end
                C_TRACE: begin
                  alt      <= 1'b0;
                  tr_start <= 1'b1;
                  state    <= S_TRACE;
                end
                C_DUMP: begin
                  link_data   <= {regs[R_OPT], regs[R_MASK], regs[R_TRIG], dump_addr};
                  link_recirc <= 1'b0;
                  link_get    <= 1'b0;
                  link_start  <= 1'b1;
                  dump_total  <= (regs[R_DUMPLEN] == 8'd0) ? 9'd256 : {1'b0, regs[R_DUMPLEN]};
                  dump_left   <= (regs[R_DUMPLEN] == 8'd0) ? 9'd256 : {1'b0, regs[R_DUMPLEN]};
                  dump_col    <= '0;
                  ret         <= S_DUMP_HEAD;
                  state       <= S_LINK;
                end
                C_XCHG: state <= S_XCHG_TX;
                C_PASS: state <= S_PASS_TX;
                default: ;
              endcase
            end
          end
          S_LINK: if (link_done) begin
            if (link_get) begin
              regs[R_CNT_L] <= link_cap[7:0];
              regs[R_CNT_H] <= link_cap[15:8];
            end
            state <= ret;
          end
          S_TRACE: if (tr_done) begin
            alt         <= 1'b0;
            link_data   <= {regs[R_OPT], regs[R_MASK], regs[R_TRIG], 16'h0000};
            link_recirc <= 1'b1;
            link_get    <= 1'b1;
            link_start  <= 1'b1;
            ret         <= S_TRACE_PRINT;
            state       <= S_LINK;
          end
          S_TRACE_PRINT: begin
            pbuf[0] <= CHAR_CR;
            pbuf[1] <= hex_ascii(regs[R_CNT_H][7:4]);
            pbuf[2] <= hex_ascii(regs[R_CNT_H][3:0]);
            pbuf[3] <= hex_ascii(regs[R_CNT_L][7:4]);
            pbuf[4] <= hex_ascii(regs[R_CNT_L][3:0]);
            pbuf[5] <= CHAR_CR;
            plen  <= 4'd6;
            pidx  <= '0;
            ret   <= S_IDLE;
            state <= S_PRINT;
          end
          S_DUMP_HEAD: begin
            pbuf[0] <= CHAR_CR;
            plen    <= 4'd1;
            pidx    <= '0;
            ret     <= S_DUMP_GO;
            state   <= S_PRINT;
          end
          S_DUMP_GO: begin
            rd_start <= 1'b1;
            state    <= S_DUMP_WAIT;
          end
          S_DUMP_WAIT: if (rd_done) begin
            pbuf[0] <= hex_ascii(rd_logic[7:4]);
            pbuf[1] <= hex_ascii(rd_logic[3:0]);
            pbuf[2] <= hex_ascii(rd_adc[7:4]);
            pbuf[3] <= hex_ascii(rd_adc[3:0]);
            pbuf[4] <= (dump_col == 4'd15 || dump_left == 9'd1) ? CHAR_CR : CHAR_COMMA;
            plen      <= 4'd5;
            pidx      <= '0;
            dump_col  <= dump_col + 4'd1;
            dump_left <= dump_left - 9'd1;
            ret       <= (dump_left == 9'd1) ? S_DUMP_END : S_DUMP_GO;
            state     <= S_PRINT;
          end
          S_DUMP_END: begin
            {regs[R_CNT_H], regs[R_CNT_L]} <= dump_addr + {7'd0, dump_total};
            state <= S_IDLE;
          end
          S_XCHG_TX: if (pod_tx_ready) state <= S_XCHG_RX;
          S_XCHG_RX: if (pod_rx_valid) begin
            regs[R_POD_RX] <= pod_rx_data;
            pbuf[0] <= pod_rx_data;
            plen    <= 4'd1;
            pidx    <= '0;
            ret     <= S_IDLE;
            state   <= S_PRINT;
          end
          S_PASS_TX:   if (pod_tx_ready) state <= S_PASS_WAIT;
          S_PASS_WAIT: if (pod_tx_ready) state <= S_PASS;
          S_PASS: ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

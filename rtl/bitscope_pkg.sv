// bitscope_pkg: constants and types shared by the BitScope capture engine.
//
// Holds the byte codes of the virtual-machine command set, the register
// numbers of the register set R0..R19, the bit positions of the Spock option
// nibble and the encoding of the TRIG7 source. The byte codes, register roles
// and option-bit meanings follow the published command and register tables;
// the numeric encoding of the TRIG7 selector (bit 2 as its MSB) and the
// lower-case hex printing are this design's choices.
package bitscope_pkg;

  // Register set R0..R19
  localparam int unsigned NUM_REGS = 20;
  localparam int unsigned R_IN      = 0;   // byte input register
  localparam int unsigned R_PTR     = 1;   // register pointer (destination)
  localparam int unsigned R_SRC     = 2;   // register source pointer
  localparam int unsigned R_PRE_L   = 3;   // sample preload low
  localparam int unsigned R_PRE_H   = 4;   // sample preload high
  localparam int unsigned R_TRIG    = 5;   // trigger pattern
  localparam int unsigned R_MASK    = 6;   // trigger mask (1 = don't care)
  localparam int unsigned R_OPT     = 7;   // Spock option byte
  localparam int unsigned R_TRACE   = 8;   // trace option
  localparam int unsigned R_CNT_L   = 9;   // counter capture low
  localparam int unsigned R_CNT_H   = 10;  // counter capture high
  localparam int unsigned R_DLY_L   = 11;  // post-trigger delay low
  localparam int unsigned R_DLY_H   = 12;  // post-trigger delay high
  localparam int unsigned R_TBASE   = 13;  // timebase expander count
  localparam int unsigned R_CHAN    = 14;  // channel A/B and range nibbles
  localparam int unsigned R_DUMPLEN = 15;  // samples per dump request
  localparam int unsigned R_EE_DATA = 16;  // EEPROM data
  localparam int unsigned R_EE_ADDR = 17;  // EEPROM address
  localparam int unsigned R_POD_TX  = 18;  // byte for the POD
  localparam int unsigned R_POD_RX  = 19;  // byte from the POD

  // Command byte codes
  localparam logic [7:0] C_RESET   = 8'h00;
  localparam logic [7:0] C_LDSRC   = 8'h23;  // '#'
  localparam logic [7:0] C_INC     = 8'h2b;  // '+'
  localparam logic [7:0] C_DEC     = 8'h2d;  // '-'
  localparam logic [7:0] C_GETCNT  = 8'h3c;  // '<'
  localparam logic [7:0] C_PROG    = 8'h3e;  // '>'
  localparam logic [7:0] C_ID      = 8'h3f;  // '?'
  localparam logic [7:0] C_LDPTR   = 8'h40;  // '@'
  localparam logic [7:0] C_DUMP    = 8'h53;  // 'S'
  localparam logic [7:0] C_TRACE   = 8'h54;  // 'T'
  localparam logic [7:0] C_CLR     = 8'h5b;  // '['
  localparam logic [7:0] C_SWAP    = 8'h5d;  // ']'
  localparam logic [7:0] C_LOAD    = 8'h6c;  // 'l'
  localparam logic [7:0] C_NEXT    = 8'h6e;  // 'n'
  localparam logic [7:0] C_PRINT   = 8'h70;  // 'p'
  localparam logic [7:0] C_STORE   = 8'h73;  // 's'
  localparam logic [7:0] C_UPDATE  = 8'h75;  // 'u'
  localparam logic [7:0] C_XCHG    = 8'h78;  // 'x'
  localparam logic [7:0] C_PASS    = 8'h7c;  // '|'

  localparam logic [7:0] CHAR_CR   = 8'h0d;
  localparam logic [7:0] CHAR_COMMA = 8'h2c;

  // Spock option nibble (loaded from R7)
  localparam int unsigned OPT_TRIG_ANALOG = 0;  // 0: logic bus, 1: ADC bus is trigger source
  localparam int unsigned OPT_T7_LSB      = 1;  // TRIG7 source select, low bit
  localparam int unsigned OPT_T7_MSB      = 2;  // TRIG7 source select, high bit
  localparam int unsigned OPT_PG1         = 3;  // POD/BNC analog source and RAM half

  typedef enum logic [1:0] {
    T7_DD7    = 2'b00,   // logic bus bit 7
    T7_MATCH  = 2'b01,   // trigger comparator match
    T7_EVENT1 = 2'b10,   // prescaler output
    T7_EVENT2 = 2'b11    // AC-coupled ADC input edge
  } trig7_sel_e;

  // Length of the Spock shift chain: counter 16 + pattern 8 + mask 8 + option 4
  localparam int unsigned SPOCK_CHAIN = 36;
  // Bits shifted per load: five bytes R7..R3
  localparam int unsigned SPOCK_LOAD_BITS = 40;

  // Lower-case ASCII hex digit
  function automatic logic [7:0] hex_ascii(input logic [3:0] n);
    return (n < 4'd10) ? (8'h30 + {4'd0, n}) : (8'h57 + {4'd0, n});
  endfunction

  // "Enter nibble" value of a command byte, valid when is_nibble_cmd is true
  function automatic logic is_nibble_cmd(input logic [7:0] c);
    return (c >= 8'h30 && c <= 8'h39) || (c >= 8'h61 && c <= 8'h66);
  endfunction

  function automatic logic [3:0] nibble_val(input logic [7:0] c);
    return (c <= 8'h39) ? c[3:0] : (c[3:0] + 4'd9);
  endfunction

endpackage

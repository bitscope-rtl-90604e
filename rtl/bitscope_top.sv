// bitscope_top: the BitScope mixed-signal capture engine.
//
// A serial-port peripheral that samples one analog channel (through an 8-bit
// flash ADC) and eight logic levels at the same time into two 32K x 8 sample
// RAMs, at up to one sample per master clock cycle (50 MS/s at 50 MHz), and
// stops a programmable time after a pattern/mask trigger. A host drives it
// one byte code at a time over the serial line (see bitscope_vm).
//
// Structure (one master clock `clk`; the sample clock zz-clk is the enable
// zz_tick made by zzclk_ctrl from the controller pin RA3):
//   host UART -> bitscope_vm (controller) -> RA3 -> zzclk_ctrl -> zz_tick
//   bitscope_vm <-> spock (shift mode: load/read; count mode: address+trigger)
//   pod_latch  -> logic bus -> logic RAM  (bit 7 replaced by Spock's TRIG7)
//   analog_source_mux -> range_select -> adc_buffer -> flash_adc -> ADC bus
//                                                    -> ADC RAM
//   both buses -> data_mux (x2) -> controller pins RA4, RB0
//   prescaler (f/64 of rf_in) -> Spock EVENT1; adc_buffer edge -> EVENT2
// While STORE is high the POD latch and the ADC drive the buses and the RAMs
// write; while it is low the RAMs drive the buses for read-back. The RAM
// address is {PG1, counter[13:0]}. When pass_active the host output follows
// POD line IO-1.
//
// The block structure follows the document's block diagram and circuit
// description. Analog voltages are signed integer millivolts. `rf_in` is a
// separate clock domain: EVENT1 is taken into Spock without synchronisation,
// as the PLD does; it only reaches the trigger logic and the TRIG7 line.
module bitscope_top
  import bitscope_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned HOST_BAUD = 19_200,
  parameter int unsigned POD_BAUD  = 9_600,
  parameter int unsigned TICK_CYCLES  = CLK_HZ / 1_000_000,    // 1 us
  parameter int unsigned BURST_CYCLES = CLK_HZ / 1_000_000,    // 1 us
  parameter int unsigned CHOP_CYCLES  = CLK_HZ / 200_000,      // 200 kHz
  parameter int unsigned RAM_ADDR_W   = 15                     // 32K x 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               serial_in,     // RB6, host to BitScope
  output logic               serial_out,    // RB5, BitScope to host
  input  logic [7:0]         pod_logic,     // logic POD inputs
  input  logic               pod_io1,       // POD I/O line in
  output logic               pod_io2,       // POD I/O line out
  input  logic               rf_in,         // 1 GHz prescaler input
  input  logic               prescale_on,   // switch S3
  input  logic signed [15:0] bnc_a_mv,      // channel A (after its input buffer)
  input  logic signed [15:0] bnc_b_mv,      // channel B
  input  logic signed [15:0] pod_a_mv,      // POD analog channel A
  input  logic signed [15:0] pod_b_mv,      // POD analog channel B
  output logic [1:0]         rng,           // RNG1..RNG0 to the range MUX
  output logic               chab,          // CH-A/B
  output logic [3:0]         chan_led       // channel sample indicators
);
  localparam int unsigned HOST_DIV = CLK_HZ / HOST_BAUD;
  localparam int unsigned POD_DIV  = CLK_HZ / POD_BAUD;

  // host serial link
  logic       rx_start, rx_valid, tx_valid, tx_ready, txd, pass_active;
  logic [7:0] rx_data, tx_data;

  uart_rx u_host_rx (.clk, .rst_n, .div(16'(HOST_DIV)), .rxd(serial_in),
                     .start(rx_start), .out_valid(rx_valid), .out_data(rx_data));
  uart_tx u_host_tx (.clk, .rst_n, .div(16'(HOST_DIV)), .in_valid(tx_valid),
                     .in_data(tx_data), .in_ready(tx_ready), .txd);
  assign serial_out = pass_active ? pod_io1 : txd;

  // controller
  logic       shift_mode, shift_in, shift_out, store, logic_y, adc_y, ra3_oe, ra3_out;
  logic [2:0] sel, porta;

  bitscope_vm #(.HOST_DIV(HOST_DIV), .POD_DIV(POD_DIV), .TICK_CYCLES(TICK_CYCLES),
                .BURST_CYCLES(BURST_CYCLES), .CHOP_CYCLES(CHOP_CYCLES)) u_vm (
    .clk, .rst_n, .rx_start, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .pass_active, .pod_io1, .pod_io2, .shift_mode, .shift_in, .shift_out, .store,
    .sel, .logic_y, .adc_y, .ra3_oe, .ra3_out, .porta);

  assign rng  = porta[1:0];
  assign chab = porta[2];

  // sample clock
  logic zz_tick, zz_level;
  zzclk_ctrl u_zz (.clk, .rst_n, .ra3_oe, .ra3_out, .zz_tick, .zz_level);

  // Spock
  logic [7:0]  logic_bus, adc_bus, latch_q, adc_q, ram_logic_q, ram_adc_q;
  logic        event1, event2, trig7, pg1;
  logic [14:0] spock_addr;

  spock u_spock (.clk, .rst_n, .zz_tick, .shift_mode, .shift_in, .shift_out,
    .logic_bus, .adc_bus, .event1, .event2, .trig_match(), .trig7, .pg1,
    .ram_addr(spock_addr), .counter(), .pattern(), .mask(), .option());

  // logic capture path
  pod_latch u_latch (.clk, .rst_n, .zz_tick, .zz_level, .oe(store), .d(pod_logic), .q(latch_q));
  assign logic_bus = store ? latch_q : ram_logic_q;

  sample_sram #(.ADDR_W(RAM_ADDR_W)) u_ram_logic (.clk, .zz_tick, .store,
    .addr(spock_addr[RAM_ADDR_W-1:0]), .wdata({trig7, latch_q[6:0]}), .rdata(ram_logic_q));

  // analog capture path
  logic signed [15:0] src_mv, rng_mv, adcin_mv;
  analog_source_mux u_src (.bnc_a_mv, .bnc_b_mv, .pod_a_mv, .pod_b_mv, .chab, .pg1,
    .led_en(store), .out_mv(src_mv), .led(chan_led));
  range_select u_range (.in_mv(src_mv), .rng, .out_mv(rng_mv));
  adc_buffer u_adcbuf (.in_mv(rng_mv), .out_mv(adcin_mv), .edge_out(event2));
  flash_adc u_adc (.clk, .rst_n, .zz_tick, .oe(store), .vin_mv(adcin_mv), .d(adc_q));
  assign adc_bus = store ? adc_q : ram_adc_q;

  sample_sram #(.ADDR_W(RAM_ADDR_W)) u_ram_adc (.clk, .zz_tick, .store,
    .addr(spock_addr[RAM_ADDR_W-1:0]), .wdata(adc_q), .rdata(ram_adc_q));

  // read-back multiplexers
  data_mux u_mux_logic (.bus({trig7, logic_bus[6:0]}), .sel, .y(logic_y));
  data_mux u_mux_adc   (.bus(adc_bus), .sel, .y(adc_y));

  // frequency prescaler
  prescaler u_presc (.rf_in, .rst_n, .enable(prescale_on), .out(event1));
endmodule

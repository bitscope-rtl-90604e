// tb_input_ranges: checks the analog chain against the instrument's table of
// input ranges.
//
// The chain is the one in bitscope_top: analog_source_mux (BNC or POD input by
// PG1) -> range_select (RNG1..RNG0) -> adc_buffer -> flash_adc. For each of
// the four ranges and both input kinds, the table gives the full-scale
// voltage:
//   BNC (x1 probe): 130 mV, 600 mV, 1.20 V, 3.16 V
//   POD:            632 mV, 2.90 V, 5.80 V, 15.28 V
// (a x10 probe only scales the BNC column by ten outside the instrument).
//
// The test checks four things for each range and input kind:
//   * +full scale gives a code of at least 250 and -full scale at most 5;
//   * 0 V gives mid-scale (128 +/- 2);
//   * +/-80 % of full scale stays off the rails (codes 22..51 and 204..234; ideal 25.6 and 230.4),
//     so the range is not larger than the table says;
//   * the edge output follows the input's sign.
// Both channels A and B are exercised. The clock and the sample enable run
// freely, and each code is read two cycles after the input changes.
module tb_input_ranges;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] bnc_a_mv = 0, bnc_b_mv = 0, pod_a_mv = 0, pod_b_mv = 0;
  logic chab = 0, pg1 = 0;
  logic [1:0] rng = 0;
  logic signed [15:0] src_mv, rng_mv, adcin_mv;
  logic [3:0] led;
  logic edge_out;
  logic [7:0] code;
  int checks = 0, failures = 0;

  analog_source_mux u_src (.bnc_a_mv, .bnc_b_mv, .pod_a_mv, .pod_b_mv, .chab, .pg1,
                           .led_en(1'b1), .out_mv(src_mv), .led);
  range_select u_range (.in_mv(src_mv), .rng, .out_mv(rng_mv));
  adc_buffer u_buf (.in_mv(rng_mv), .out_mv(adcin_mv), .edge_out);
  flash_adc u_adc (.clk, .rst_n, .zz_tick(1'b1), .oe(1'b1), .vin_mv(adcin_mv), .d(code));

  always #5 clk = ~clk;

  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic apply(input logic pod, input logic b, input int mv);
    bnc_a_mv = 0; bnc_b_mv = 0; pod_a_mv = 0; pod_b_mv = 0;
    pg1 = pod; chab = b;
    if (!pod && !b) bnc_a_mv = 16'(mv);
    if (!pod &&  b) bnc_b_mv = 16'(mv);
    if ( pod && !b) pod_a_mv = 16'(mv);
    if ( pod &&  b) pod_b_mv = 16'(mv);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fs_bnc [4] = '{130, 600, 1200, 3160};
    int fs_pod [4] = '{632, 2900, 5800, 15280};
    int fs;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int pod = 0; pod < 2; pod++)
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 4; r++) begin
          string tag;
          tag = $sformatf("%s%s range %0d", pod ? "POD " : "BNC ", b ? "B" : "A", r);
          rng = 2'(r);
          fs = pod ? fs_pod[r] : fs_bnc[r];
          apply(1'(pod), 1'(b), fs);
          check(code >= 8'd250, $sformatf("%s +FS code %0d", tag, code));
          check(edge_out, {tag, " +FS edge"});
          apply(1'(pod), 1'(b), -fs);
          check(code <= 8'd5, $sformatf("%s -FS code %0d", tag, code));
          check(!edge_out, {tag, " -FS edge"});
          apply(1'(pod), 1'(b), 0);
          check(code >= 8'd126 && code <= 8'd130, $sformatf("%s zero code %0d", tag, code));
          apply(1'(pod), 1'(b), fs * 8 / 10);
          check(code >= 8'd204 && code <= 8'd234, $sformatf("%s +80%% code %0d", tag, code));
          apply(1'(pod), 1'(b), -fs * 8 / 10);
          check(code >= 8'd22 && code <= 8'd51, $sformatf("%s -80%% code %0d", tag, code));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

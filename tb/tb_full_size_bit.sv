// tb_full_size_bit: one bit through the whole channel at the default sizes.
//
// thermal_covert_top is instantiated with no parameter overrides: 128-bit
// word, 1 s bits of a 100 MHz clock, 1 ms sensor windows of about 13 000
// counts, 50-sample averages and runs of 3. The transmitter starts on a word
// whose first bit is '1' and the receiver starts with it; after one second
// the receiver must deliver that first bit as '1', having decided it from a
// heating trend and never from a cooling one, and the sensor must have
// delivered 1000 samples in the 16-bit range. A whole 128-bit word would
// take 128 s of simulated time, so the test stops after the first bit.
// thermal_die_model stands for the die with a 100 ms time constant and a
// rise of about 20 degrees while heating.
module tb_full_size_bit;
  timeunit 1ns;
  timeprecision 1ps;
  import thermal_pkg::*;

  localparam logic [127:0] KEY = 128'h8123_4567_89AB_CDEF_FEDC_BA98_7654_3210;

  logic               clk = 1'b0, heat_clk = 1'b0, rst_n = 1'b0;
  logic               tx_enable = 1'b0, rx_enable = 1'b0;
  logic               heater_on, tx_bit_strobe, tx_word_wrap;
  logic [19:0]        ro_heater_out;
  logic [9:0]         sr_heater_tap;
  logic signed [31:0] die_temp_mc;
  logic [15:0]        sample, det_avg;
  logic               sample_valid, det_block_valid, det_heat, det_cool, rx_level;
  trend_e             det_trend;
  logic               rx_bit, rx_valid, rx_word_valid;
  logic [127:0]       rx_word;

  int checks = 0, failures = 0, nsamples = 0, nbits = 0, nheat = 0, ncool = 0;
  int min_sample = 65535, max_sample = 0;

  thermal_covert_top dut (
    .clk(clk), .heat_clk(heat_clk), .rst_n(rst_n),
    .tx_enable(tx_enable), .tx_mode(MODE_INTERNAL), .tx_data(KEY),
    .heater_on(heater_on), .tx_bit_strobe(tx_bit_strobe), .tx_word_wrap(tx_word_wrap),
    .ro_heater_out(ro_heater_out), .sr_heater_tap(sr_heater_tap),
    .rx_enable(rx_enable), .die_temp_mc(die_temp_mc),
    .sample(sample), .sample_valid(sample_valid), .det_block_valid(det_block_valid),
    .det_trend(det_trend), .det_avg(det_avg), .det_heat(det_heat), .det_cool(det_cool),
    .rx_level(rx_level), .rx_bit(rx_bit), .rx_valid(rx_valid), .rx_word(rx_word),
    .rx_word_valid(rx_word_valid));

  thermal_die_model #(.N_RO(20), .TAU_NS(100_000_000.0), .GAIN_MC_PER_TOGGLE(0.00003125))
    u_die (.heater_osc(ro_heater_out[0]), .die_temp_mc(die_temp_mc));

  always #5 clk = ~clk;
  // The shift-register heater is idle in internal mode; its clock is kept slow.
  always #500 heat_clk = ~heat_clk;

  always @(negedge clk) begin
    if (sample_valid) begin
      nsamples++;
      if (nsamples > 1) begin  // the first window starts one clock late
        if (int'(sample) < min_sample) min_sample = int'(sample);
        if (int'(sample) > max_sample) max_sample = int'(sample);
      end
    end
    if (det_heat) nheat++;
    if (det_cool) ncool++;
    if (rx_valid) begin
      nbits++;
      checks++;
      if (rx_bit != KEY[127]) begin
        failures++;
        $display("FAIL first bit got %b sent %b", rx_bit, KEY[127]);
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk);
    tx_enable = 1'b1;
    rx_enable = 1'b1;
    repeat (100_000_000 + 10) @(posedge clk);
    checks++;
    if (nbits != 1) begin failures++; $display("FAIL %0d bits after 1 s", nbits); end
    checks++;
    if (nsamples < 999 || nsamples > 1000) begin
      failures++;
      $display("FAIL %0d samples in 1 s", nsamples);
    end
    checks++;
    // about 13 000 counts per 1 ms window, lower when warm
    if (min_sample < 12000 || max_sample > 13100 || max_sample - min_sample < 100) begin
      failures++;
      $display("FAIL sample range %0d..%0d", min_sample, max_sample);
    end
    checks++;
    if (nheat < 1 || ncool != 0) begin
      failures++;
      $display("FAIL decisions: heat %0d cool %0d", nheat, ncool);
    end
    $display("samples %0d (%0d..%0d), heat decisions %0d, die at %0d mC",
             nsamples, min_sample, max_sample, nheat, die_temp_mc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

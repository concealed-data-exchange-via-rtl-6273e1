// tb_internal_128: the internal-channel workload at its full word length.
//
// The transmitter sends one 128-bit word (a stand-in for a cipher key) over
// the ring-oscillator heater, and the on-chip receiver must return it bit for
// bit and as a whole word. The word holds runs of up to seven equal bits, so
// the detector has to keep its bit through long stretches of steady
// temperature. Timing is scaled like the end-to-end test (300 000-cycle bits,
// 500-cycle sensor windows, 50-sample averages, runs of 3) so the 128 bits
// take 384 ms of simulated time; heat reaches the sensor through
// thermal_die_model.
module tb_internal_128;
  timeunit 1ns;
  timeprecision 1ps;
  import thermal_pkg::*;

  localparam int           DW   = 128;
  localparam int           SLOT = 300_000;
  localparam logic [127:0] KEY  = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;

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
  logic [DW-1:0]      rx_word;

  int checks = 0, failures = 0, nbits = 0, nwords = 0;

  thermal_covert_top #(
    .DATA_W(DW), .SLOT_CYCLES(SLOT), .WINDOW_CYCLES(500), .AVG_LEN(50), .RUN_LEN(3),
    .BIT_CYCLES(SLOT)
  ) dut (
    .clk(clk), .heat_clk(heat_clk), .rst_n(rst_n),
    .tx_enable(tx_enable), .tx_mode(MODE_INTERNAL), .tx_data(KEY),
    .heater_on(heater_on), .tx_bit_strobe(tx_bit_strobe), .tx_word_wrap(tx_word_wrap),
    .ro_heater_out(ro_heater_out), .sr_heater_tap(sr_heater_tap),
    .rx_enable(rx_enable), .die_temp_mc(die_temp_mc),
    .sample(sample), .sample_valid(sample_valid), .det_block_valid(det_block_valid),
    .det_trend(det_trend), .det_avg(det_avg), .det_heat(det_heat), .det_cool(det_cool),
    .rx_level(rx_level), .rx_bit(rx_bit), .rx_valid(rx_valid), .rx_word(rx_word),
    .rx_word_valid(rx_word_valid));

  thermal_die_model #(.N_RO(20)) u_die (.heater_osc(ro_heater_out[0]), .die_temp_mc(die_temp_mc));

  always #5 clk = ~clk;
  // The shift-register heater is idle in internal mode; its clock is kept slow.
  always #50 heat_clk = ~heat_clk;

  always @(negedge clk) begin
    if (rx_valid) begin
      checks++;
      if (rx_bit != KEY[DW-1-nbits]) begin
        failures++;
        $display("FAIL bit %0d got %b sent %b", nbits, rx_bit, KEY[DW-1-nbits]);
      end
      nbits++;
    end
    if (rx_word_valid) begin
      nwords++;
      checks++;
      if (rx_word != KEY) begin
        failures++;
        $display("FAIL word %h sent %h", rx_word, KEY);
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
    repeat (DW * SLOT + 10) @(posedge clk);
    checks++;
    if (nbits != DW || nwords != 1) begin
      failures++;
      $display("FAIL %0d bits, %0d words received", nbits, nwords);
    end
    $display("received %h", rx_word);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_thermal_covert_top: end-to-end test of the thermal covert channel.
//
// The transmitter and the on-chip receiver are joined through
// thermal_die_model, which turns the ring-oscillator heater's activity into a
// die temperature at the sensor. Sizes are scaled so that one bit takes 3 ms
// of simulated time: 16-bit word, 300 000-cycle bits, 500-cycle counting
// windows (65 counts), 50-sample averages, runs of 3.
//
// Phase 1, internal mode: a 16-bit word is sent twice around its loop. Every
// received bit must equal the sent bit of the same period and both received
// words must equal the sent word. Phase 2, external mode: two data bits, "1"
// and "0", go out as eight slots each on the shift-register heater; the
// testbench checks the 1000_0000 slot pattern, that only the shift-register
// heater runs and that it runs only in the heated slot.
//
// Each mechanism is counted and must happen at least once: heated slots,
// heat and cool decisions, blocks without a decision, word loops, received
// words, the mode switch, external heated slots and shift-register heating.
module tb_thermal_covert_top;
  timeunit 1ns;
  timeprecision 1ps;
  import thermal_pkg::*;

  localparam int          DW    = 16;
  localparam int          SLOT  = 300_000;
  localparam int          WIN   = 500;
  localparam logic [15:0] WORD  = 16'hB38D;
  localparam logic [15:0] WORD2 = 16'hA000;

  logic               clk = 1'b0, heat_clk = 1'b0, rst_n = 1'b0;
  logic               tx_enable = 1'b0, rx_enable = 1'b0;
  tx_mode_e           tx_mode = MODE_INTERNAL;
  logic [DW-1:0]      tx_data = WORD;
  logic               heater_on, tx_bit_strobe, tx_word_wrap;
  logic [19:0]        ro_heater_out;
  logic [9:0]         sr_heater_tap;
  logic signed [31:0] die_temp_mc;
  logic [15:0]        sample, det_avg;
  logic               sample_valid, det_block_valid, det_heat, det_cool, rx_level;
  trend_e             det_trend;
  logic               rx_bit, rx_valid, rx_word_valid;
  logic [DW-1:0]      rx_word;

  int checks = 0, failures = 0;
  int n_heat_slots = 0, n_dec_heat = 0, n_dec_cool = 0, n_hold = 0, n_wrap = 0;
  int n_rx_words = 0, n_mode_switch = 0, n_ext_heated = 0, n_sr_toggle = 0;
  int n_rx_bits = 0, n_samples = 0;
  int sr_toggle_off = 0, ro_toggle_ext = 0;
  bit ext_phase = 1'b0;

  thermal_covert_top #(
    .DATA_W(DW), .SLOT_CYCLES(SLOT), .WINDOW_CYCLES(WIN), .AVG_LEN(50), .RUN_LEN(3),
    .BIT_CYCLES(SLOT)
  ) dut (
    .clk(clk), .heat_clk(heat_clk), .rst_n(rst_n),
    .tx_enable(tx_enable), .tx_mode(tx_mode), .tx_data(tx_data),
    .heater_on(heater_on), .tx_bit_strobe(tx_bit_strobe), .tx_word_wrap(tx_word_wrap),
    .ro_heater_out(ro_heater_out), .sr_heater_tap(sr_heater_tap),
    .rx_enable(rx_enable), .die_temp_mc(die_temp_mc),
    .sample(sample), .sample_valid(sample_valid), .det_block_valid(det_block_valid),
    .det_trend(det_trend), .det_avg(det_avg), .det_heat(det_heat), .det_cool(det_cool),
    .rx_level(rx_level), .rx_bit(rx_bit), .rx_valid(rx_valid), .rx_word(rx_word),
    .rx_word_valid(rx_word_valid));

  thermal_die_model #(.N_RO(20)) u_die (.heater_osc(ro_heater_out[0]), .die_temp_mc(die_temp_mc));

  always #5   clk = ~clk;       // 100 MHz system clock
  always #2.5 heat_clk = ~heat_clk;  // 200 MHz heater clock

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters and per-cycle checks
  logic heater_q = 1'b0;
  always @(negedge clk) begin
    if (heater_on && !heater_q) begin
      if (ext_phase) n_ext_heated++; else n_heat_slots++;
    end
    heater_q <= heater_on;
    if (tx_word_wrap) n_wrap++;
    if (sample_valid) n_samples++;
    if (det_heat) n_dec_heat++;
    if (det_cool) n_dec_cool++;
    if (det_block_valid && !det_heat && !det_cool) n_hold++;
  end

  // The heater shifts two heater clocks after its enable (synchroniser).
  logic [9:0] tap_q = '0;
  logic [3:0] en_hist = '0;
  always @(posedge heat_clk) begin
    #0.1;
    if (sr_heater_tap != tap_q) begin
      if (en_hist != '0) n_sr_toggle++;
      else               sr_toggle_off++;
    end
    tap_q   = sr_heater_tap;
    en_hist = {en_hist[2:0], dut.sr_heat_en};
  end

  always @(ro_heater_out[0]) if (ext_phase) ro_toggle_ext++;

  // received bits against sent bits (internal phase)
  always @(negedge clk) begin
    if (rx_valid && !ext_phase) begin
      logic e;
      e = WORD[DW-1-(n_rx_bits % DW)];
      checks++;
      if (rx_bit != e) begin
        failures++;
        $display("FAIL rx bit %0d got %b sent %b", n_rx_bits, rx_bit, e);
      end
      n_rx_bits++;
    end
    if (rx_word_valid && !ext_phase) begin
      n_rx_words++;
      check(rx_word == WORD, "received word equals sent word");
      $display("received word %h (sent %h) at %0t", rx_word, WORD, $time);
    end
  end

  // external phase: heater_on high only in the first slot of a '1' bit
  int ext_cyc = -1;
  always @(posedge clk) begin
    #1;
    if (ext_phase && tx_enable && ext_cyc >= 0) begin
      int b, s;
      logic e;
      b = ext_cyc / (SLOT * EXT_SLOTS);
      s = (ext_cyc / SLOT) % EXT_SLOTS;
      e = WORD2[DW-1-(b % DW)] && (s == 0);
      if (heater_on != e) begin
        checks++;
        failures++;
        $display("FAIL external slot pattern at bit %0d slot %0d", b, s);
      end
    end
    if (ext_phase && tx_enable) ext_cyc++;
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // Phase 1: internal mode, receiver listening
    @(negedge clk);
    tx_mode   = MODE_INTERNAL;
    tx_enable = 1'b1;
    rx_enable = 1'b1;
    repeat (2 * DW * SLOT + 10) @(posedge clk);
    check(n_rx_bits == 2 * DW, "two words of bits received");
    check(n_samples >= (2 * DW * SLOT) / WIN - 1, "sample rate");
    // Phase 2: switch to external mode
    @(negedge clk);
    tx_enable = 1'b0;
    rx_enable = 1'b0;
    repeat (10) @(posedge clk);
    @(negedge clk);
    tx_mode   = MODE_EXTERNAL;
    tx_data   = WORD2;
    ext_phase = 1'b1;
    ext_cyc   = 0;
    n_mode_switch++;
    tx_enable = 1'b1;
    repeat (2 * EXT_SLOTS * SLOT) @(posedge clk);
    @(negedge clk) tx_enable = 1'b0;
    repeat (10) @(posedge clk);

    check(n_heat_slots > 0,  "internal heated slots happened");
    check(n_dec_heat > 0,    "heat decisions happened");
    check(n_dec_cool > 0,    "cool decisions happened");
    check(n_hold > 0,        "blocks without decision happened");
    check(n_wrap > 0,        "word loop happened");
    check(n_rx_words == 2,   "two received words");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_ext_heated == 1, "one heated slot in external mode");
    check(n_sr_toggle >= SLOT * 2 - 10, "shift-register heater ran for one slot");
    check(sr_toggle_off == 0, "shift-register heater idle outside heated slots");
    check(ro_toggle_ext == 0, "ring-oscillator heater idle in external mode");
    $display("mechanisms: heated slots %0d, heat decisions %0d, cool decisions %0d, holds %0d, loops %0d, rx words %0d, mode switches %0d, external heated slots %0d, SR heater toggles %0d",
             n_heat_slots, n_dec_heat, n_dec_cool, n_hold, n_wrap, n_rx_words, n_mode_switch,
             n_ext_heated, n_sr_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;  // 200 ms
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

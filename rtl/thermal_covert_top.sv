// thermal_covert_top: thermal covert channel inside one FPGA, transmitter and
// on-chip receiver.
//
// Transmitter: data_encoder turns the data word into heater-control slots.
// In internal mode the slots drive ro_heater, a bank of ring oscillators
// whose heat crosses the silicon die to the receiver. In external mode the
// eight-slot code drives sr_heater, the overclocked shift-register heater that
// is strong enough to warm the package for a sensor outside the chip. The
// heater of the other mode stays off.
//
// Receiver: sensor_ro is a slow ring oscillator whose frequency falls as the
// die warms. ro_counter counts its cycles in the windows that sensor_ctrl
// times, giving one temperature sample per window. bit_detect averages the
// samples in blocks and decides '1' (heating) or '0' (cooling) from three
// block-to-block moves in the same direction. data_decoder samples that
// decision once per bit period and assembles received words.
//
// The heat path between the heaters and the sensor is physical: the top
// brings out the heater outputs and takes the die temperature at the sensor,
// die_temp_mc (milli-degrees Celsius above the reference), as an input.
// The receiver only listens to internal-mode transmissions; external ones
// are read off chip.
//
// Clocks: clk is the system clock (100 MHz assumed, all slot, window and bit
// counts are in its cycles), heat_clk the fast shift-register heater clock
// (200 MHz in the described design). rst_n is an active-low asynchronous
// reset for both. Block structure and sizes follow the described design; the
// mode steering, clock frequency and port set are this design's own.
module thermal_covert_top
  import thermal_pkg::*;
#(
  parameter int unsigned DATA_W        = 128,
  parameter int unsigned SLOT_CYCLES   = 100_000_000,  // 1 s per slot
  parameter int unsigned N_RO          = 20,
  parameter int unsigned RO_INV        = 3,
  parameter int unsigned N_SR          = 10,
  parameter int unsigned SR_LEN        = 250,
  parameter int unsigned SENSOR_INV    = 51,
  parameter int unsigned TEMPCO_PPM    = 1_000,
  parameter int unsigned WINDOW_CYCLES = 100_000,      // 1000 samples/s
  parameter int unsigned AVG_LEN       = 50,
  parameter int unsigned RUN_LEN       = 3,
  parameter int unsigned BIT_CYCLES    = SLOT_CYCLES   // receiver bit period
) (
  input  logic               clk,
  input  logic               heat_clk,
  input  logic               rst_n,
  // transmitter
  input  logic               tx_enable,
  input  tx_mode_e           tx_mode,
  input  logic [DATA_W-1:0]  tx_data,
  output logic               heater_on,
  output logic               tx_bit_strobe,
  output logic               tx_word_wrap,
  output logic [N_RO-1:0]    ro_heater_out,
  output logic [N_SR-1:0]    sr_heater_tap,
  // receiver
  input  logic               rx_enable,
  input  logic signed [31:0] die_temp_mc,
  output logic [COUNT_W-1:0] sample,
  output logic               sample_valid,
  output logic               det_block_valid,
  output trend_e             det_trend,
  output logic [COUNT_W-1:0] det_avg,
  output logic               det_heat,
  output logic               det_cool,
  output logic               rx_level,
  output logic               rx_bit,
  output logic               rx_valid,
  output logic [DATA_W-1:0]  rx_word,
  output logic               rx_word_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  // ---------------- transmitter ----------------
  tx_mode_e cur_mode;
  logic     ro_heat_en, sr_heat_en;

  data_encoder #(
    .DATA_W      (DATA_W),
    .SLOT_CYCLES (SLOT_CYCLES)
  ) u_encoder (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (tx_enable),
    .mode       (tx_mode),
    .data_in    (tx_data),
    .heater_on  (heater_on),
    .bit_strobe (tx_bit_strobe),
    .word_wrap  (tx_word_wrap),
    .cur_mode   (cur_mode)
  );

  assign ro_heat_en = heater_on && (cur_mode == MODE_INTERNAL);
  assign sr_heat_en = heater_on && (cur_mode == MODE_EXTERNAL);

  ro_heater #(
    .N_RO  (N_RO),
    .N_INV (RO_INV)
  ) u_ro_heater (
    .en     (ro_heat_en),
    .ro_out (ro_heater_out)
  );

  sr_heater #(
    .N_SR   (N_SR),
    .SR_LEN (SR_LEN)
  ) u_sr_heater (
    .clk   (heat_clk),
    .rst_n (rst_n),
    .en    (sr_heat_en),
    .tap   (sr_heater_tap)
  );

  // ---------------- receiver ----------------
  logic               ro_en, count_en, count_clr, sensor_osc;
  logic [COUNT_W-1:0] count;

  sensor_ro #(
    .N_INV      (SENSOR_INV),
    .TEMPCO_PPM (TEMPCO_PPM)
  ) u_sensor_ro (
    .en          (ro_en),
    .die_temp_mc (die_temp_mc),
    .osc         (sensor_osc)
  );

  ro_counter #(
    .WIDTH (COUNT_W)
  ) u_counter (
    .clk      (clk),
    .rst_n    (rst_n),
    .ro_in    (sensor_osc),
    .count_en (count_en),
    .clear    (count_clr),
    .count    (count)
  );

  sensor_ctrl #(
    .WINDOW_CYCLES (WINDOW_CYCLES),
    .WIDTH         (COUNT_W)
  ) u_sensor_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (rx_enable),
    .ro_en        (ro_en),
    .count_en     (count_en),
    .count_clr    (count_clr),
    .count        (count),
    .sample       (sample),
    .sample_valid (sample_valid)
  );

  bit_detect #(
    .WIDTH   (COUNT_W),
    .AVG_LEN (AVG_LEN),
    .RUN_LEN (RUN_LEN)
  ) u_bit_detect (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample_valid (sample_valid),
    .sample       (sample),
    .block_valid  (det_block_valid),
    .trend        (det_trend),
    .bit_level    (rx_level),
    .decided_heat (det_heat),
    .decided_cool (det_cool),
    .avg          (det_avg)
  );

  data_decoder #(
    .DATA_W     (DATA_W),
    .BIT_CYCLES (BIT_CYCLES)
  ) u_data_decoder (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (rx_enable),
    .bit_level  (rx_level),
    .rx_bit     (rx_bit),
    .rx_valid   (rx_valid),
    .word       (rx_word),
    .word_valid (rx_word_valid)
  );

endmodule

// sensor_ctrl: control logic of the ring-oscillator temperature sensor.
//
// While enable is high it keeps the sensor oscillator running and divides
// time into counting windows of WINDOW_CYCLES system clocks. In the last
// cycle of every window it copies the counter into sample, pulses
// sample_valid and clears the counter for the next window. The count of a
// window is proportional to the oscillator frequency, so it stands for the
// die temperature (a lower count is a warmer die).
//
// Interface: ro_en goes to the oscillator's enable, count_en and count_clr to
// the counter, count comes back from it. Timing: one sample every
// WINDOW_CYCLES clocks, the first one WINDOW_CYCLES clocks after enable
// rises. The default, 100 000 cycles of a 100 MHz clock, polls the counter
// 1000 times per second, the upper end of the 500 to 1000 polls per second
// used in the described design; the clock frequency is this design's own
// choice.
module sensor_ctrl
  import thermal_pkg::*;
#(
  parameter int unsigned WINDOW_CYCLES = 100_000,
  parameter int unsigned WIDTH         = COUNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic             ro_en,
  output logic             count_en,
  output logic             count_clr,
  input  logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] sample,
  output logic             sample_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIN_W = (WINDOW_CYCLES > 1) ? $clog2(WINDOW_CYCLES) : 1;

  logic [WIN_W-1:0] win_cnt;
  logic             running;

  wire win_end = running && (win_cnt == WIN_W'(WINDOW_CYCLES - 1));

  assign ro_en     = enable;
  assign count_en  = running;
  assign count_clr = win_end || !running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      win_cnt      <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      running      <= enable;
      if (!running) begin
        win_cnt <= '0;
      end else if (win_end) begin
        win_cnt      <= '0;
        sample       <= count;
        sample_valid <= 1'b1;
      end else begin
        win_cnt <= win_cnt + 1'b1;
      end
    end
  end

  initial assert (WINDOW_CYCLES >= 2) else $error("sensor_ctrl: WINDOW_CYCLES must be at least 2");

endmodule

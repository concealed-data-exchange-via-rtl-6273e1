// sensor_ro: behavioural model of the receiver's temperature-sensing ring
// oscillator (not synthesizable logic; the real part is a hand-placed loop of
// N_INV inverters with an enable gate).
//
// A long ring oscillator runs slower and dissipates less than the heater, so
// it adds little heat of its own, and its frequency drops as the die warms
// because carrier mobility falls. The model toggles osc with a half period of
// HALF_PERIOD_PS at the reference temperature, stretched by TEMPCO_PPM parts
// per million for every degree above it.
//
// Interface: en starts and stops the oscillator (osc holds while en is low);
// die_temp_mc is the die temperature at the sensor in milli-degrees Celsius
// above the reference, a physical quantity brought in as a port so that a
// thermal model can drive it. Timing: half period
//   HALF_PERIOD_PS * (1 + TEMPCO_PPM * die_temp_mc / 1e9)  picoseconds,
// recomputed every half period. The 51 inverters and the frequency of about
// 13 MHz follow the described design; the size of the temperature
// coefficient is this model's own choice (the design gives none).
// Synthesis that ignores the delays sees the held output as a latch; the
// model is for simulation only.
module sensor_ro #(
  parameter int unsigned N_INV          = 51,
  parameter int unsigned HALF_PERIOD_PS = 38_462,  // about 13 MHz
  parameter int unsigned TEMPCO_PPM     = 1_000    // per degree Celsius
) (
  input  logic               en,
  input  logic signed [31:0] die_temp_mc,
  output logic               osc
);
  timeunit 1ps;
  timeprecision 1ps;

  function automatic longint unsigned half_period(input logic signed [31:0] t_mc);
    longint h;
    h = longint'(HALF_PERIOD_PS)
      + (longint'(HALF_PERIOD_PS) * longint'(TEMPCO_PPM) * longint'(t_mc)) / 64'sd1_000_000_000;
    return (h < 1) ? 64'd1 : 64'(h);
  endfunction

  initial osc = 1'b0;

  always begin
    if (!en) @(posedge en);
    #(half_period(die_temp_mc));
    if (en) osc = ~osc;
  end

  initial assert (N_INV % 2 == 1) else $error("sensor_ro: N_INV must be odd");

endmodule

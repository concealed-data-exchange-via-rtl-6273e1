// thermal_die_model: behavioural model of the heat path across the die, for
// testbenches only.
//
// Every STEP_NS nanoseconds it counts the toggles of one heater oscillator
// output, multiplies them by the number of oscillators to get the switching
// activity, and integrates a first-order thermal model:
//   T += GAIN_MC_PER_TOGGLE * toggles - T * STEP_NS / TAU_NS
// where T is the die temperature at the sensor in milli-degrees Celsius above
// ambient. The silicon conducts heat quickly, so the distance between heater
// and sensor is not modelled. The time constant and gain are chosen to make a
// simulation short, not taken from a measured device.
module thermal_die_model #(
  parameter int  N_RO                = 20,
  parameter int  STEP_NS             = 1000,
  parameter real TAU_NS              = 500_000.0,
  parameter real GAIN_MC_PER_TOGGLE  = 0.00625
) (
  input  logic               heater_osc,   // one ring-oscillator output
  output logic signed [31:0] die_temp_mc
);
  timeunit 1ns;
  timeprecision 1ps;

  int  toggles = 0;
  real temp = 0.0;

  always @(heater_osc) toggles++;

  initial begin
    die_temp_mc = 0;
    #1 toggles = 0;
    forever begin
      #(STEP_NS);
      temp = temp + GAIN_MC_PER_TOGGLE * real'(toggles * N_RO)
                  - temp * real'(STEP_NS) / TAU_NS;
      toggles = 0;
      die_temp_mc = $rtoi(temp);
    end
  end
endmodule

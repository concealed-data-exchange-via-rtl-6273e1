// ro_heater: behavioural model of the ring-oscillator heater (not
// synthesizable logic; a real ring oscillator is a combinational loop that is
// placed by hand).
//
// The heater is N_RO ring oscillators that share one enable. Each oscillator
// is a loop of N_INV inverters closed through an AND gate whose other input is
// the enable, so it oscillates while the enable is high and stops when it is
// low. Its switching current is what heats the die. The model does not build
// the gate loop; it toggles every output with the half period that the loop
// would have, which is the period given for the real part (160 MHz on the
// FPGA the design was measured on). All oscillators are modelled in step.
//
// Interface: en (heater control from the encoder), ro_out (the last inverter
// output of each oscillator). ro_out keeps its value while en is low.
// Timing: ro_out toggles every HALF_PERIOD_PS picoseconds while en is high.
// N_RO = 20, N_INV = 3 and 160 MHz follow the described design; the
// in-step toggling and the output chosen as the port are this model's own.
// Synthesis that ignores the delays sees the held output as a latch; the
// model is for simulation only.
module ro_heater #(
  parameter int unsigned N_RO           = 20,
  parameter int unsigned N_INV          = 3,
  parameter int unsigned HALF_PERIOD_PS = 3125  // 160 MHz
) (
  input  logic            en,
  output logic [N_RO-1:0] ro_out
);
  timeunit 1ps;
  timeprecision 1ps;

  initial ro_out = '0;

  always begin
    if (!en) @(posedge en);
    #(HALF_PERIOD_PS);
    if (en) ro_out = ~ro_out;
  end

  // A ring oscillator needs an odd number of inverters in its loop.
  initial assert (N_INV % 2 == 1) else $error("ro_heater: N_INV must be odd");

endmodule

// thermal_pkg: types and constants shared by the thermal covert-channel
// transmitter and receiver.
//
// The channel has two operating modes. In internal mode the data bits drive
// the heater directly, one heater-control slot per bit (the silicon die has
// little thermal inertia). In external mode every data bit becomes eight
// heater-control slots: a one is sent as 1000_0000 and a zero as 0000_0000,
// so the chip package has seven slots to cool after every heated slot. Both
// encodings follow the described design; the enum encoding is this design's
// own choice.
package thermal_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic {
    MODE_INTERNAL = 1'b0,  // data bit drives the heater directly
    MODE_EXTERNAL = 1'b1   // each data bit becomes EXT_SLOTS heater slots
  } tx_mode_e;

  // Heater-control slots per data bit in external mode.
  localparam int unsigned EXT_SLOTS = 8;

  // Slot patterns in external mode, sent MSB first.
  localparam logic [EXT_SLOTS-1:0] EXT_PATTERN_ONE  = 8'b1000_0000;
  localparam logic [EXT_SLOTS-1:0] EXT_PATTERN_ZERO = 8'b0000_0000;

  // Width of the sensor ring-oscillator counter.
  localparam int unsigned COUNT_W = 16;

  // Direction of the last comparison between two averages.
  typedef enum logic [1:0] {
    TREND_NONE = 2'd0,  // equal averages, or no previous average yet
    TREND_HEAT = 2'd1,  // count fell: RO slowed down, die got warmer
    TREND_COOL = 2'd2   // count rose: RO sped up, die got cooler
  } trend_e;

endpackage

// ro_counter: counts the cycles of the sensor ring oscillator.
//
// The oscillator output is asynchronous to the system clock, so it passes a
// two-flip-flop synchroniser and a rising-edge detector; every rising edge
// adds one to a COUNT_W-bit counter while count_en is high. The system clock
// must run at more than twice the oscillator frequency (100 MHz against about
// 13 MHz by default). The counter saturates at its maximum instead of
// wrapping, so an over-long window cannot alias to a small count.
//
// Interface: count is the running value. clear restarts the count; an edge
// seen in the same cycle is counted as the first of the new window, so no
// edge is lost between windows. Timing: an oscillator edge reaches count
// three system clocks later. The 16-bit width follows the described design;
// the synchroniser, edge counting and saturation are this design's own.
module ro_counter
  import thermal_pkg::*;
#(
  parameter int unsigned WIDTH = COUNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ro_in,
  input  logic             count_en,
  input  logic             clear,
  output logic [WIDTH-1:0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [2:0] sync_q;  // two synchroniser stages and the previous value
  logic       edge_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], ro_in};
  end

  assign edge_seen = sync_q[1] & ~sync_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear) begin
      count <= WIDTH'(count_en && edge_seen);
    end else if (count_en && edge_seen && (count != '1)) begin
      count <= count + 1'b1;
    end
  end

endmodule

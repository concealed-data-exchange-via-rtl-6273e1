// sr_heater: overclocked shift-register heater.
//
// N_SR circular shift registers of SR_LEN flip-flops each are loaded with the
// pattern 0101... at reset. While the heater is enabled every register rotates
// by one position each clock, so every flip-flop toggles on every clock edge
// and the switching power heats the chip package. While disabled the
// registers hold their contents and nothing toggles. More registers or longer
// registers give more heat.
//
// Interface: clk is the fast heater clock (200 MHz in the described design),
// en is the heater control from the encoder (synchronised here with two
// flip-flops, because the encoder runs on the system clock). tap holds the
// last flip-flop of each register, so the registers stay in the netlist.
// Timing: heating starts three heater clocks after en rises and stops three
// clocks after it falls. The sizes (10 registers of 250 flip-flops) and the
// 0101 pattern follow the described design; the synchroniser and tap outputs
// are this design's own.
module sr_heater #(
  parameter int unsigned N_SR   = 10,
  parameter int unsigned SR_LEN = 250
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [N_SR-1:0] tap
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [1:0]        en_sync;
  logic [SR_LEN-1:0] sr_q [N_SR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_sync <= '0;
    else        en_sync <= {en_sync[0], en};
  end

  // 0101... with bit 0 = 1.
  function automatic logic [SR_LEN-1:0] alt_pattern();
    logic [SR_LEN-1:0] p;
    for (int i = 0; i < SR_LEN; i++) p[i] = (i % 2 == 0);
    return p;
  endfunction

  for (genvar g = 0; g < N_SR; g++) begin : g_sr
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          sr_q[g] <= alt_pattern();
      else if (en_sync[1]) sr_q[g] <= {sr_q[g][SR_LEN-2:0], sr_q[g][SR_LEN-1]};
    end
    assign tap[g] = sr_q[g][SR_LEN-1];
  end

  // With an odd length the 0101 ring would hold two equal neighbours and
  // one flip-flop pair would stop toggling.
  initial assert (SR_LEN % 2 == 0) else $error("sr_heater: SR_LEN must be even");

endmodule

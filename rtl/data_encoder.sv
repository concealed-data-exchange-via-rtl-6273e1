// data_encoder: turns a data word into heater-control slots.
//
// The encoder is a clock-driven shift register that sends the word MSB first
// and starts again at the MSB after the last bit, so the word is broadcast in
// an endless loop. Each heater-control slot lasts SLOT_CYCLES clock cycles,
// which sets the transmission speed. In internal mode each data bit is one
// slot and heater_on equals the bit. In external mode each data bit becomes
// EXT_SLOTS slots: 1000_0000 for a one, 0000_0000 for a zero.
//
// Interface: load the word on data_in while enable is low; the word is
// captured on the first cycle that enable is high and held until enable falls.
// mode is sampled at the same moment. heater_on is registered. bit_strobe
// pulses for one cycle when a new data bit starts; word_wrap pulses when the
// loop goes back to the first bit. cur_mode is the mode captured at the start,
// used to steer heater_on to the heater of that mode.
//
// Timing: one data bit lasts SLOT_CYCLES cycles (internal) or
// EXT_SLOTS*SLOT_CYCLES cycles (external). heater_on follows enable by one
// cycle. With the default 100 MHz clock and SLOT_CYCLES = 100e6 the internal
// rate is the 1 bit/s that the design reaches. The loop over a 128-bit word,
// the two encodings and the rate follow the described design; the clock
// frequency, the load/enable handshake and MSB-first order are this design's
// own choices.
module data_encoder
  import thermal_pkg::*;
#(
  parameter int unsigned DATA_W      = 128,
  parameter int unsigned SLOT_CYCLES = 100_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  tx_mode_e          mode,
  input  logic [DATA_W-1:0] data_in,
  output logic              heater_on,
  output logic              bit_strobe,
  output logic              word_wrap,
  output tx_mode_e          cur_mode
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned SLOT_W = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1;
  localparam int unsigned BIT_W  = (DATA_W > 1) ? $clog2(DATA_W) : 1;
  localparam int unsigned SUB_W  = $clog2(EXT_SLOTS);

  logic [DATA_W-1:0]    word_q;     // word being broadcast, MSB is current bit
  logic [EXT_SLOTS-1:0] pattern_q;  // slot pattern of the current bit
  logic [SLOT_W-1:0]    slot_cnt;   // cycles left in the current slot
  logic [SUB_W-1:0]     sub_cnt;    // slot index inside the bit (external)
  logic [BIT_W-1:0]     bit_cnt;    // index of the current bit in the word
  tx_mode_e             mode_q;
  logic                 active;

  assign cur_mode = mode_q;

  wire slot_end = (slot_cnt == SLOT_W'(SLOT_CYCLES - 1));
  wire bit_end  = slot_end &&
                  ((mode_q == MODE_INTERNAL) || (sub_cnt == SUB_W'(EXT_SLOTS - 1)));

  function automatic logic [EXT_SLOTS-1:0] pattern_of(input logic b);
    return b ? EXT_PATTERN_ONE : EXT_PATTERN_ZERO;
  endfunction

  // Heater state in the first slot of a bit.
  function automatic logic first_slot(input tx_mode_e m, input logic b);
    logic [EXT_SLOTS-1:0] p;
    p = pattern_of(b);
    return (m == MODE_INTERNAL) ? b : p[EXT_SLOTS-1];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      word_q     <= '0;
      pattern_q  <= '0;
      slot_cnt   <= '0;
      sub_cnt    <= '0;
      bit_cnt    <= '0;
      mode_q     <= MODE_INTERNAL;
      heater_on  <= 1'b0;
      bit_strobe <= 1'b0;
      word_wrap  <= 1'b0;
    end else begin
      bit_strobe <= 1'b0;
      word_wrap  <= 1'b0;
      if (!enable) begin
        active    <= 1'b0;
        heater_on <= 1'b0;
      end else if (!active) begin
        // Capture the word and start with its MSB.
        active     <= 1'b1;
        word_q     <= data_in;
        mode_q     <= mode;
        pattern_q  <= pattern_of(data_in[DATA_W-1]);
        slot_cnt   <= '0;
        sub_cnt    <= '0;
        bit_cnt    <= '0;
        bit_strobe <= 1'b1;
        heater_on  <= first_slot(mode, data_in[DATA_W-1]);
      end else begin
        slot_cnt <= slot_end ? '0 : slot_cnt + 1'b1;
        if (bit_end) begin
          // Rotate the word so the next bit is at the MSB.
          logic [DATA_W-1:0] next_word;
          next_word  = {word_q[DATA_W-2:0], word_q[DATA_W-1]};
          word_q     <= next_word;
          pattern_q  <= pattern_of(next_word[DATA_W-1]);
          sub_cnt    <= '0;
          bit_strobe <= 1'b1;
          if (bit_cnt == BIT_W'(DATA_W - 1)) begin
            bit_cnt   <= '0;
            word_wrap <= 1'b1;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
          heater_on <= first_slot(mode_q, next_word[DATA_W-1]);
        end else if (slot_end) begin
          // External mode: next slot of the same bit's pattern.
          sub_cnt   <= sub_cnt + 1'b1;
          heater_on <= pattern_q[EXT_SLOTS-2-int'(sub_cnt)];
        end
      end
    end
  end

endmodule

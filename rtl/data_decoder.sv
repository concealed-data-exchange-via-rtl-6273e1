// data_decoder: turns the detected bit level into received bits and words.
//
// The receiver knows the bit period of the channel. From the moment enable
// rises it counts BIT_CYCLES system clocks per bit and, at the end of every
// bit period, takes the detector's bit_level as the received bit. The bits
// are shifted in MSB first; after DATA_W bits the collected word is
// presented on word with a word_valid pulse, and collection starts again, so
// a transmitter that loops over its word gives a word every DATA_W bits.
//
// The transmitter sends the bits plainly, without an error-detecting or
// -correcting code, so this decoder has no code to check; a design that adds
// one would decode it here. The sampling point at the end of the bit period
// gives the detector, which lags the heater by a few averaging blocks, the
// most time to settle.
//
// Interface: rx_bit / rx_valid one bit per period; word / word_valid one
// word per DATA_W bits. Timing: the first rx_valid comes BIT_CYCLES clocks
// after enable rises. There is no frame marker, so word boundaries are those
// of the receiver's own count. The 128-bit word and the 1 bit/s rate (100e6
// cycles of the assumed 100 MHz clock) follow the described design; the
// sampling scheme is this design's own.
module data_decoder #(
  parameter int unsigned DATA_W     = 128,
  parameter int unsigned BIT_CYCLES = 100_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              bit_level,
  output logic              rx_bit,
  output logic              rx_valid,
  output logic [DATA_W-1:0] word,
  output logic              word_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CYC_W = (BIT_CYCLES > 1) ? $clog2(BIT_CYCLES) : 1;
  localparam int unsigned BIT_W = $clog2(DATA_W + 1);

  logic [CYC_W-1:0]  cyc_cnt;
  logic [BIT_W-1:0]  nbits;
  logic [DATA_W-2:0] shreg;  // bits received so far in this word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_cnt    <= '0;
      nbits      <= '0;
      shreg      <= '0;
      word       <= '0;
      rx_bit     <= 1'b0;
      rx_valid   <= 1'b0;
      word_valid <= 1'b0;
    end else begin
      rx_valid   <= 1'b0;
      word_valid <= 1'b0;
      if (!enable) begin
        cyc_cnt <= '0;
        nbits   <= '0;
      end else if (cyc_cnt == CYC_W'(BIT_CYCLES - 1)) begin
        logic [DATA_W-1:0] next;
        next     = {shreg, bit_level};
        cyc_cnt  <= '0;
        rx_bit   <= bit_level;
        rx_valid <= 1'b1;
        if (nbits == BIT_W'(DATA_W - 1)) begin
          nbits      <= '0;
          shreg      <= '0;
          word       <= next;
          word_valid <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
          shreg <= next[DATA_W-2:0];
        end
      end else begin
        cyc_cnt <= cyc_cnt + 1'b1;
      end
    end
  end

endmodule

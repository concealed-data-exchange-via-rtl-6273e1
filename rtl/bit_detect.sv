// bit_detect: decides between a received '0' and '1' from the sensor counts.
//
// The counts are grouped into blocks of AVG_LEN consecutive samples and each
// block is averaged. Every new average is compared with the previous one (the
// AVG_LEN samples before it). A falling count means a slower sensor
// oscillator, so a warmer die and an active heater: trend HEAT. A rising count
// means the die is cooling: trend COOL. When RUN_LEN comparisons in a row
// show the same trend, the detected bit becomes '1' (HEAT) or '0' (COOL);
// otherwise the bit stays as it was. The bit starts at '0', so an idle
// channel reads as a stream of zeros.
//
// Because all blocks hold the same number of samples, comparing the block
// sums is the same as comparing the averages, so no divider is needed; avg
// still gives the average of the last block for observation.
//
// Interface: one count per sample_valid pulse. At the end of every block
// block_valid pulses for one cycle with trend, the new bit_level, and
// decided_heat / decided_cool, which pulse when a run of RUN_LEN has just been
// reached. Timing: bit_level changes at the earliest RUN_LEN+1 blocks after
// the trend begins, because the first block has no previous one to compare
// with.
//
// AVG_LEN = 50, RUN_LEN = 3, the start value '0' and "keep the last bit
// otherwise" follow the described design. Non-overlapping blocks, the mapping
// of falling counts to '1' and treating equal averages as a break in the run
// are this design's own reading.
module bit_detect
  import thermal_pkg::*;
#(
  parameter int unsigned WIDTH   = COUNT_W,
  parameter int unsigned AVG_LEN = 50,
  parameter int unsigned RUN_LEN = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_valid,
  input  logic [WIDTH-1:0] sample,
  output logic             block_valid,
  output trend_e           trend,
  output logic             bit_level,
  output logic             decided_heat,
  output logic             decided_cool,
  output logic [WIDTH-1:0] avg
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned SUM_W = WIDTH + $clog2(AVG_LEN + 1);
  localparam int unsigned IDX_W = (AVG_LEN > 1) ? $clog2(AVG_LEN) : 1;
  localparam int unsigned RUN_W = $clog2(RUN_LEN + 1);

  logic [SUM_W-1:0] acc;        // running sum of the current block
  logic [IDX_W-1:0] idx;        // samples already in the current block
  logic [SUM_W-1:0] prev_sum;   // sum of the previous block
  logic             have_prev;
  trend_e           run_trend;  // trend of the current run
  logic [RUN_W-1:0] run_len;    // length of the current run, saturating

  wire              last_sample = sample_valid && (idx == IDX_W'(AVG_LEN - 1));
  wire  [SUM_W-1:0] block_sum   = acc + SUM_W'(sample);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      idx          <= '0;
      prev_sum     <= '0;
      have_prev    <= 1'b0;
      run_trend    <= TREND_NONE;
      run_len      <= '0;
      bit_level    <= 1'b0;
      block_valid  <= 1'b0;
      trend        <= TREND_NONE;
      decided_heat <= 1'b0;
      decided_cool <= 1'b0;
      avg          <= '0;
    end else begin
      block_valid  <= 1'b0;
      decided_heat <= 1'b0;
      decided_cool <= 1'b0;
      if (sample_valid) begin
        if (last_sample) begin
          trend_e           t;
          logic [RUN_W-1:0] len;
          acc       <= '0;
          idx       <= '0;
          prev_sum  <= block_sum;
          have_prev <= 1'b1;
          avg       <= WIDTH'(block_sum / SUM_W'(AVG_LEN));

          if (!have_prev || block_sum == prev_sum) t = TREND_NONE;
          else if (block_sum < prev_sum)           t = TREND_HEAT;
          else                                     t = TREND_COOL;

          if (t == TREND_NONE)                 len = '0;
          else if (t != run_trend)             len = RUN_W'(1);
          else if (run_len != RUN_W'(RUN_LEN)) len = run_len + 1'b1;
          else                                 len = run_len;

          run_trend   <= t;
          run_len     <= len;
          trend       <= t;
          block_valid <= 1'b1;
          // Decide once, when the run first reaches RUN_LEN.
          if (len == RUN_W'(RUN_LEN) &&
              !(t == run_trend && run_len == RUN_W'(RUN_LEN))) begin
            if (t == TREND_HEAT) begin
              bit_level    <= 1'b1;
              decided_heat <= 1'b1;
            end else begin
              bit_level    <= 1'b0;
              decided_cool <= 1'b1;
            end
          end
        end else begin
          acc <= block_sum;
          idx <= idx + 1'b1;
        end
      end
    end
  end

  initial assert (RUN_LEN >= 1 && AVG_LEN >= 1)
    else $error("bit_detect: RUN_LEN and AVG_LEN must be at least 1");

endmodule

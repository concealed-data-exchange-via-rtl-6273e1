// tb_bit_detect: self-checking test of the bit-detecting circuit.
//
// Feeds 4-sample blocks (AVG_LEN = 4, RUN_LEN = 3) whose levels follow a
// random walk with long rising and falling stretches, plus a few hand-made
// sequences (equal blocks, a run of exactly three, alternating moves). A
// reference model in the testbench keeps its own list of block sums and
// derives the trend, the run length and the expected bit after every block;
// the circuit's block_valid outputs must match it block for block.
module tb_bit_detect;
  timeunit 1ns;
  timeprecision 1ps;
  import thermal_pkg::*;

  localparam int AVG = 4;
  localparam int RUN = 3;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        sample_valid = 1'b0;
  logic [15:0] sample = '0;
  logic        block_valid, bit_level, decided_heat, decided_cool;
  trend_e      trend;
  logic [15:0] avg;
  int          checks = 0, failures = 0;
  int          n_heat = 0, n_cool = 0, n_hold = 0;

  // reference model state
  int          sums[$];
  int          trends[$];  // 0 none, 1 heat, 2 cool
  logic        ref_bit = 1'b0;

  bit_detect #(.WIDTH(16), .AVG_LEN(AVG), .RUN_LEN(RUN)) dut (
    .clk(clk), .rst_n(rst_n), .sample_valid(sample_valid), .sample(sample),
    .block_valid(block_valid), .trend(trend), .bit_level(bit_level),
    .decided_heat(decided_heat), .decided_cool(decided_cool), .avg(avg));

  always #5 clk = ~clk;

  // Send one block whose samples add up to 4*level + spread pattern.
  task automatic send_block(input int level);
    int s, tot, n, run_ok, t, exp_t;
    logic exp_dh, exp_dc;
    tot = 0;
    for (int i = 0; i < AVG; i++) begin
      s = level + ((i % 2 == 0) ? 2 : -2);
      tot += s;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      @(negedge clk);
      sample = 16'(s);
      sample_valid = 1'b1;
      @(negedge clk);
      sample_valid = 1'b0;
    end
    // reference: trend of this block
    n = sums.size();
    if (n == 0 || sums[n-1] == tot) exp_t = 0;
    else if (tot < sums[n-1])       exp_t = 1;
    else                            exp_t = 2;
    sums.push_back(tot);
    trends.push_back(exp_t);
    // a decision happens when the last RUN trends are equal and non-zero and
    // the trend before them is different (first time the run is reached)
    exp_dh = 1'b0;
    exp_dc = 1'b0;
    n = trends.size();
    if (exp_t != 0 && n >= RUN) begin
      run_ok = 1;
      for (int k = n - RUN; k < n; k++) if (trends[k] != exp_t) run_ok = 0;
      if (run_ok && (n == RUN || trends[n-RUN-1] != exp_t)) begin
        if (exp_t == 1) begin exp_dh = 1'b1; ref_bit = 1'b1; end
        else            begin exp_dc = 1'b1; ref_bit = 1'b0; end
      end
    end
    // block_valid is high from the clock edge that took the last sample
    checks++;
    t = int'(trend);
    if (!block_valid || t != exp_t || bit_level != ref_bit || decided_heat != exp_dh || decided_cool != exp_dc
        || avg != 16'(tot / AVG)) begin
      failures++;
      $display("FAIL block %0d: trend %0d/%0d bit %b/%b dh %b/%b dc %b/%b avg %0d/%0d", n - 1,
               t, exp_t, bit_level, ref_bit, decided_heat, exp_dh, decided_cool, exp_dc,
               avg, tot / AVG);
    end
    if (exp_dh) n_heat++;
    if (exp_dc) n_cool++;
    if (exp_t != 0 && !exp_dh && !exp_dc) n_hold++;
    @(negedge clk);
  endtask

  initial begin
    int level, dir;
    #23 rst_n = 1'b1;
    // initial value: zero, and a short run must not change it
    checks++;
    if (bit_level != 1'b0) begin failures++; $display("FAIL start value"); end
    send_block(1000); send_block(1000); send_block(990); send_block(980); // 2 heats
    send_block(980);                                                      // equal: breaks
    send_block(970); send_block(960); send_block(950);                    // run of 3 -> 1
    send_block(940); send_block(930);                                     // stays 1
    send_block(950); send_block(940); send_block(950); send_block(940);   // alternating: hold
    send_block(960); send_block(970); send_block(980);                    // run of 3 -> 0
    // random walk with stretches of one direction
    level = 20000;
    dir = 1;
    for (int b = 0; b < 300; b++) begin
      if ($urandom_range(0, 5) == 0) dir = -dir;
      level += dir * $urandom_range(0, 30) - (($urandom_range(0, 3) == 0) ? dir * 40 : 0);
      send_block(level);
    end
    checks++;
    if (n_heat < 5 || n_cool < 5 || n_hold < 5) begin
      failures++;
      $display("FAIL too few events: heat %0d cool %0d hold %0d", n_heat, n_cool, n_hold);
    end
    $display("decisions: heat %0d cool %0d, moves without decision %0d", n_heat, n_cool, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

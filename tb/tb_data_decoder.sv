// tb_data_decoder: self-checking test of the data decoder.
//
// With 8-bit words and 5-cycle bit periods the testbench changes bit_level at
// random times and records, on its own, the level at the last clock of every
// bit period counted from enable. Every rx_bit must equal that record, come
// exactly 5 cycles after the previous one, and every 8 bits word must hold
// the last 8 recorded bits, first bit in the MSB.
module tb_data_decoder;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DW  = 8;
  localparam int BIT = 5;

  logic          clk = 1'b0, rst_n = 1'b0, enable = 1'b0, level = 1'b0;
  logic          rx_bit, rx_valid, word_valid;
  logic [DW-1:0] word;
  int            checks = 0, failures = 0, cyc = 0, nbits = 0, nwords = 0, last_cyc = -1;
  logic          expq[$];
  logic [DW-1:0] exp_word;

  data_decoder #(.DATA_W(DW), .BIT_CYCLES(BIT)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .bit_level(level), .rx_bit(rx_bit),
    .rx_valid(rx_valid), .word(word), .word_valid(word_valid));

  always #5 clk = ~clk;

  // independent record of the level at the last clock of each bit period
  always @(posedge clk) begin
    if (enable) begin
      if (cyc % BIT == BIT - 1) expq.push_back(level);
      cyc++;
    end else begin
      cyc = 0;
    end
  end

  always @(negedge clk) begin
    if (rx_valid) begin
      logic e;
      e = expq.pop_front();
      checks++;
      if (rx_bit != e) begin
        failures++;
        $display("FAIL bit %0d got %b expected %b", nbits, rx_bit, e);
      end
      if (last_cyc >= 0) begin
        checks++;
        if (cyc - last_cyc != BIT) begin
          failures++;
          $display("FAIL bit spacing %0d", cyc - last_cyc);
        end
      end
      last_cyc = cyc;
      exp_word = {exp_word[DW-2:0], e};
      nbits++;
    end
    if (word_valid) begin
      checks++;
      nwords++;
      if (word != exp_word || nbits % DW != 0) begin
        failures++;
        $display("FAIL word %h expected %h after %0d bits", word, exp_word, nbits);
      end
    end
  end

  initial begin
    #23 rst_n = 1'b1;
    repeat (10) @(negedge clk);
    enable = 1'b1;
    for (int i = 0; i < DW * BIT * 6; i++) begin
      @(negedge clk);
      #2;
      if ($urandom_range(0, 3) == 0) level = ~level;
    end
    checks++;
    if (nwords != 6 || nbits != 6 * DW) begin
      failures++;
      $display("FAIL %0d words %0d bits", nwords, nbits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_encoder: self-checking test of data_encoder.
//
// A reference model computes, for every clock after the encoder starts,
// which data bit and which slot are on air and so what heater_on, bit_strobe
// and word_wrap must be. Both modes are run over several loops of an 8-bit
// word with 3-cycle slots, which also checks the bit rate (one bit per slot
// internally, eight slots per bit externally) and the endless loop.
module tb_data_encoder;
  timeunit 1ns;
  timeprecision 1ps;
  import thermal_pkg::*;

  localparam int DW   = 8;
  localparam int SLOT = 3;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          enable = 1'b0;
  tx_mode_e      mode = MODE_INTERNAL;
  logic [DW-1:0] data = '0;
  logic          heater_on, bit_strobe, word_wrap;
  tx_mode_e      cur_mode;
  int            checks = 0, failures = 0, wraps = 0;

  data_encoder #(.DATA_W(DW), .SLOT_CYCLES(SLOT)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .mode(mode), .data_in(data),
    .heater_on(heater_on), .bit_strobe(bit_strobe), .word_wrap(word_wrap),
    .cur_mode(cur_mode));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what, input int j);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, j, got, exp);
    end
  endtask

  task automatic run_mode(input tx_mode_e m, input logic [DW-1:0] d, input int ncyc);
    int bitlen, b, slot;
    logic e;
    bitlen = (m == MODE_INTERNAL) ? SLOT : SLOT * EXT_SLOTS;
    @(negedge clk);
    mode   = m;
    data   = d;
    enable = 1'b1;
    for (int j = 0; j < ncyc; j++) begin
      @(posedge clk); #1;
      b    = (j / bitlen) % DW;
      slot = (j / SLOT) % EXT_SLOTS;
      e    = (m == MODE_INTERNAL) ? d[DW-1-b] : (d[DW-1-b] && slot == 0);
      check(heater_on, e, "heater_on", j);
      check(bit_strobe, (j % bitlen) == 0, "bit_strobe", j);
      check(word_wrap, j > 0 && (j % (bitlen * DW)) == 0, "word_wrap", j);
      check(cur_mode == m, 1'b1, "cur_mode", j);
      if (word_wrap) wraps++;
      // Data input changes after capture must not matter.
      data = ~d;
    end
    @(negedge clk);
    enable = 1'b0;
    @(posedge clk); #1;
    check(heater_on, 1'b0, "heater off after disable", 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_mode(MODE_INTERNAL, 8'b1011_0010, 3 * SLOT * DW + 5);
    run_mode(MODE_EXTERNAL, 8'b0110_1001, 2 * SLOT * EXT_SLOTS * DW + 5);
    run_mode(MODE_INTERNAL, 8'b1000_0001, SLOT * DW + 2);
    checks++;
    if (wraps != 6) begin
      failures++;
      $display("FAIL word wraps %0d expected 6", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sensor_ctrl: self-checking test of the sensor control logic.
//
// A stand-in counter in the testbench counts clock cycles while count_en is
// high and clears on count_clr. With 10-cycle windows every sample must be
// exactly 9 (the counter value in the window's last cycle), samples must come
// every 10 cycles, ro_en must follow enable, and no sample may appear while
// the sensor is disabled.
module tb_sensor_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int W = 10;

  logic        clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic        ro_en, count_en, count_clr, sample_valid;
  logic [15:0] count = '0, sample;
  int          checks = 0, failures = 0, nsamples = 0, last_cyc = -1, cyc = 0;

  sensor_ctrl #(.WINDOW_CYCLES(W), .WIDTH(16)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .ro_en(ro_en), .count_en(count_en),
    .count_clr(count_clr), .count(count), .sample(sample), .sample_valid(sample_valid));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (count_clr)     count <= '0;
    else if (count_en) count <= count + 1'b1;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    checks++;
    if (ro_en != enable) begin failures++; $display("FAIL ro_en"); end
    if (sample_valid) begin
      nsamples++;
      checks++;
      if (sample != 16'(W - 1)) begin
        failures++;
        $display("FAIL sample %0d expected %0d", sample, W - 1);
      end
      if (last_cyc >= 0) begin
        checks++;
        if (cyc - last_cyc != W) begin
          failures++;
          $display("FAIL sample spacing %0d", cyc - last_cyc);
        end
      end
      last_cyc = cyc;
      if (!enable) begin failures++; $display("FAIL sample while disabled"); end
    end
  end

  initial begin
    #23 rst_n = 1'b1;
    repeat (30) @(posedge clk);
    checks++;
    if (nsamples != 0) begin failures++; $display("FAIL samples before enable"); end
    @(negedge clk) enable = 1'b1;
    repeat (W * 8 + 3) @(posedge clk);
    @(negedge clk) enable = 1'b0;
    #1;
    checks++;
    if (nsamples != 8) begin failures++; $display("FAIL %0d samples expected 8", nsamples); end
    repeat (40) @(posedge clk);
    @(negedge clk) enable = 1'b1;
    last_cyc = -1;
    repeat (W * 3 + 3) @(posedge clk);
    #2;
    checks++;
    if (nsamples != 11) begin failures++; $display("FAIL %0d samples expected 11", nsamples); end
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

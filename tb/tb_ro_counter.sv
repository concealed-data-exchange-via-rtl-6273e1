// tb_ro_counter: self-checking test of the ring-oscillator counter.
//
// Drives an asynchronous square wave (period 73 ns against a 10 ns clock)
// and checks that the count equals the number of rising edges sent, that
// count_en gates the count, that clear restarts it, and, with a 4-bit
// counter, that it saturates at 15.
module tb_ro_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ro = 1'b0, count_en = 1'b0, clear = 1'b0;
  logic [15:0] count;
  logic [3:0]  count4;
  int          checks = 0, failures = 0;

  ro_counter #(.WIDTH(16)) dut  (.clk(clk), .rst_n(rst_n), .ro_in(ro), .count_en(count_en),
                                 .clear(clear), .count(count));
  ro_counter #(.WIDTH(4))  dut4 (.clk(clk), .rst_n(rst_n), .ro_in(ro), .count_en(count_en),
                                 .clear(clear), .count(count4));

  always #5 clk = ~clk;

  task automatic pulses(input int n);
    repeat (n) begin
      #36.5 ro = 1'b1;
      #36.5 ro = 1'b0;
    end
    #40;  // let the last edge pass the synchroniser
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #23 rst_n = 1'b1;
    pulses(5);
    expect_eq(count, 0, "count while disabled");
    count_en = 1'b1;
    pulses(37);
    expect_eq(count, 37, "count of 37 edges");
    expect_eq(count4, 15, "4-bit counter saturates");
    count_en = 1'b0;
    pulses(4);
    expect_eq(count, 37, "count holds while disabled");
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    expect_eq(count, 0, "count after clear");
    count_en = 1'b1;
    pulses(250);
    expect_eq(count, 250, "count of 250 edges");
    expect_eq(count4, 15, "4-bit counter stays saturated");
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

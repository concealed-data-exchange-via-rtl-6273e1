// tb_sensor_ro: self-checking test of the sensor ring-oscillator model.
//
// Measures the period at the reference temperature (about 13 MHz, 76.924 ns)
// and 10 and 40 degrees above it, where a coefficient of 1000 ppm per degree
// must stretch it by 1 % and 4 %, and checks that the oscillator stops while
// disabled.
module tb_sensor_ro;
  timeunit 1ns;
  timeprecision 1ps;

  logic               en = 1'b0;
  logic signed [31:0] temp = 0;
  logic               osc;
  int                 checks = 0, failures = 0;
  int                 edges = 0;

  sensor_ro #(.N_INV(51), .HALF_PERIOD_PS(38_462), .TEMPCO_PPM(1_000)) dut (
    .en(en), .die_temp_mc(temp), .osc(osc));

  always @(posedge osc) edges++;

  task automatic measure(input int t_mc, input real exp_ns);
    realtime t0, t1;
    temp = t_mc;
    @(posedge osc);
    @(posedge osc);
    t0 = $realtime;
    repeat (10) @(posedge osc);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 10.0 < exp_ns - 0.01 || (t1 - t0) / 10.0 > exp_ns + 0.01) begin
      failures++;
      $display("FAIL period at %0d mC: %f ns, expected %f", t_mc, (t1 - t0) / 10.0, exp_ns);
    end
  endtask

  initial begin
    #500;
    checks++;
    if (edges != 0) begin failures++; $display("FAIL runs while disabled"); end
    en = 1'b1;
    measure(0, 76.924);
    measure(10_000, 76.924 * 1.01);
    measure(40_000, 76.924 * 1.04);
    measure(0, 76.924);
    en = 1'b0;
    #200;
    edges = 0;
    #1000;
    checks++;
    if (edges != 0) begin failures++; $display("FAIL runs after disable"); end
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

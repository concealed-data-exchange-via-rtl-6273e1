// tb_ro_heater: self-checking test of the ring-oscillator heater model.
//
// Checks that the outputs stay still while the enable is low, that all
// oscillators toggle with the 3.125 ns half period of a 160 MHz ring while it
// is high, and that they stop again when it falls.
module tb_ro_heater;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 20;

  logic         en = 1'b0;
  logic [N-1:0] ro_out;
  int           checks = 0, failures = 0;
  int           toggles = 0;
  realtime      last_t = 0.0, min_dt = 1.0e9, max_dt = 0.0;
  logic         measuring = 1'b0;

  ro_heater #(.N_RO(N), .N_INV(3)) dut (.en(en), .ro_out(ro_out));

  always @(ro_out[0]) begin
    toggles++;
    if (measuring) begin
      if ($realtime - last_t < min_dt) min_dt = $realtime - last_t;
      if ($realtime - last_t > max_dt) max_dt = $realtime - last_t;
    end
    last_t = $realtime;
    checks++;
    if (ro_out != {N{ro_out[0]}}) begin
      failures++;
      $display("FAIL oscillators out of step: %b", ro_out);
    end
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1 toggles = 0;  // ignore the model's own initialisation at time 0
    #100;
    expect_eq(toggles, 0, "toggles while disabled");
    en = 1'b1;
    #10;
    measuring = 1'b1;
    toggles = 0;
    #1000;
    // 1000 ns / 3.125 ns = 320 half periods
    expect_eq(toggles, 320, "toggles in 1000 ns");
    checks++;
    if (min_dt < 3.124 || max_dt > 3.126) begin
      failures++;
      $display("FAIL half period %f..%f ns", min_dt, max_dt);
    end
    en = 1'b0;
    #10;
    measuring = 1'b0;
    toggles = 0;
    #200;
    expect_eq(toggles, 0, "toggles after disable");
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

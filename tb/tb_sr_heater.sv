// tb_sr_heater: self-checking test of the shift-register heater.
//
// Uses three 8-bit registers. A reference ring in the testbench, loaded with
// the same 0101 pattern and enabled through the same two-clock delay, must
// match the tap outputs every clock. The test also checks that every
// flip-flop toggles on every clock while heating (the heat source) and that
// nothing toggles while the heater is off.
module tb_sr_heater;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NS = 3;
  localparam int L  = 8;

  logic          clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [NS-1:0] tap;
  logic [L-1:0]  ref_sr;
  logic [1:0]    ref_en;
  logic [NS-1:0] tap_prev;
  logic          on_prev = 1'b0;
  int            checks = 0, failures = 0, toggles_on = 0, toggles_off = 0;
  int            cyc_on = 0;

  sr_heater #(.N_SR(NS), .SR_LEN(L)) dut (.clk(clk), .rst_n(rst_n), .en(en), .tap(tap));

  always #2.5 clk = ~clk;  // 200 MHz

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_sr <= 8'b0101_0101;
      ref_en <= '0;
    end else begin
      ref_en <= {ref_en[0], en};
      if (ref_en[1]) ref_sr <= {ref_sr[L-2:0], ref_sr[L-1]};
    end
  end

  always @(posedge clk) begin
    #0.5;
    checks++;
    if (tap != {NS{ref_sr[L-1]}}) begin
      failures++;
      $display("FAIL tap %b expected %b", tap, {NS{ref_sr[L-1]}});
    end
    if (rst_n) begin
      checks++;
      // Every register of the heater must be a full 0101 ring.
      for (int g = 0; g < NS; g++)
        if (dut.sr_q[g] != 8'b0101_0101 && dut.sr_q[g] != 8'b1010_1010) begin
          failures++;
          $display("FAIL register %0d holds %b", g, dut.sr_q[g]);
        end
      // The edge just taken shifted if the enable was on before it.
      if (tap != tap_prev) begin
        if (on_prev) toggles_on++; else toggles_off++;
      end
      if (on_prev) cyc_on++;
    end
    tap_prev = tap;
    on_prev  = ref_en[1];
  end

  initial begin
    #11 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk) en = 1'b1;
    repeat (40) @(posedge clk);
    @(negedge clk) en = 1'b0;
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (toggles_off != 0 || toggles_on != cyc_on || cyc_on < 38) begin
      failures++;
      $display("FAIL toggles on %0d of %0d cycles, off %0d", toggles_on, cyc_on, toggles_off);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

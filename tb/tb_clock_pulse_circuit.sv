// tb_clock_pulse_circuit: checks one clock-pulse stage. Every rising clock
// edge must give exactly one pulse, starting BUF ps after the edge and
// DELAY+INV ps wide; a falling edge must give none. The delayed clock for
// the next stage must follow the clock DELAY+2*INV ps later on both edges.
module tb_clock_pulse_circuit;
  timeunit 1ps;
  timeprecision 1ps;
  import pulsed_sr_pkg::*;

  localparam int unsigned D = DEF_DELAY_PS, INV = DEF_INV_PS, BUF = DEF_BUF_PS;
  localparam int unsigned HALF = 2000;
  localparam int CYCLES = 200;

  logic clk = 1'b0;
  logic clk_pulse, clk_next;
  int checks = 0, failures = 0;
  time t_rise, t_fall;
  int pulses = 0;

  clock_pulse_circuit dut (.clk_in(clk), .clk_pulse, .clk_next);

  task automatic expect_eq(input time got, input time exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0t ps, expected %0t ps", what, got, exp);
    end
  endtask

  initial begin
    #(2 * HALF * (CYCLES + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) t_rise = $time;
  always @(negedge clk) t_fall = $time;

  always @(posedge clk_pulse) if ($time > 0) begin
    pulses++;
    expect_eq($time - t_rise, BUF, "pulse start after rising edge");
  end
  always @(negedge clk_pulse) if ($time > 2 * HALF) begin
    expect_eq($time - t_rise, BUF + D + INV, "pulse end after rising edge");
  end
  always @(posedge clk_next) if ($time > 2 * HALF)
    expect_eq($time - t_rise, D + 2 * INV, "delayed clock rise");
  always @(negedge clk_next) if ($time > 2 * HALF)
    expect_eq($time - t_fall, D + 2 * INV, "delayed clock fall");

  initial begin
    #(2 * HALF);
    for (int c = 0; c < CYCLES; c++) begin
      clk = 1'b1; #(HALF);
      clk = 1'b0; #(HALF);
    end
    checks++;
    if (pulses != CYCLES) begin
      failures++;
      $display("FAIL %0d pulses for %0d rising edges", pulses, CYCLES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

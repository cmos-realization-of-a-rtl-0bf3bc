// tb_delayed_pulsed_clock_gen: checks the five-pulse generator. After every
// rising clock edge the pulses must come in the order <T>, <4>, <3>, <2>,
// <1>, each exactly once, each (DELAY+INV) ps wide, pulse i of the train
// starting BUF + i*(DELAY+2*INV) ps after the edge, and no two pulses may
// ever be high at the same time.
module tb_delayed_pulsed_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;
  import pulsed_sr_pkg::*;

  localparam int unsigned D = DEF_DELAY_PS, INV = DEF_INV_PS, BUF = DEF_BUF_PS;
  localparam int unsigned HALF = 2000;
  localparam int CYCLES = 200;

  logic clk = 1'b0;
  logic clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;
  logic [NUM_PULSES-1:0] train;  // train[i]: i-th pulse of the cycle
  int checks = 0, failures = 0;
  time t_rise;
  int seen;       // pulses seen in this cycle
  int overlaps = 0;

  delayed_pulsed_clock_gen dut (.clk, .clk_pulse_t, .clk_pulse);

  // expected order: T first, then <SUB_BITS> down to <1>
  assign train[0] = clk_pulse_t;
  for (genvar k = 1; k <= SUB_BITS; k++) begin : g_train
    assign train[SUB_BITS + 1 - k] = clk_pulse[k];
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #(2 * HALF * (CYCLES + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if ($time > 2 * HALF) expect_eq(seen, NUM_PULSES, "pulses in previous cycle");
    t_rise = $time;
    seen = 0;
  end

  for (genvar i = 0; i < NUM_PULSES; i++) begin : g_mon
    always @(posedge train[i]) if ($time > 2 * HALF) begin
      expect_eq(seen, i, "position of pulse in the train");
      expect_eq($time - t_rise, BUF + i * (D + 2 * INV), "pulse start");
      seen++;
    end
    always @(negedge train[i]) if ($time > 2 * HALF)
      expect_eq($time - t_rise, BUF + i * (D + 2 * INV) + D + INV, "pulse end");
  end

  // sample every 5 ps for overlapping pulses
  initial begin
    forever begin
      #5;
      if ($countones(train) > 1) overlaps++;
    end
  end

  initial begin
    seen = 0;
    #(2 * HALF);
    for (int c = 0; c < CYCLES; c++) begin
      clk = 1'b1; #(HALF);
      clk = 1'b0; #(HALF);
    end
    expect_eq(overlaps, 0, "samples with overlapping pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

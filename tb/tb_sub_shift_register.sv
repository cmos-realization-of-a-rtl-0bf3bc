// tb_sub_shift_register: one 4-bit sub shift register driven by the delayed
// pulsed clock generator. A random bit stream is shifted in; after cycle n
// latch Qk must hold the bit applied in cycle n-k+1 and the temporary latch
// the bit of cycle n-4, computed here from the input history alone.
module tb_sub_shift_register;
  timeunit 1ps;
  timeprecision 1ps;
  import pulsed_sr_pkg::*;

  localparam int unsigned HALF = 2000;
  localparam int CYCLES = 300;

  logic clk = 1'b0;
  logic clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;
  logic sin = 1'b0;
  logic [SUB_BITS-1:0] q;
  logic t;
  logic hist [int];
  int checks = 0, failures = 0;

  delayed_pulsed_clock_gen u_gen (.clk, .clk_pulse_t, .clk_pulse);
  sub_shift_register dut (.clk_pulse_t, .clk_pulse, .sin, .q, .t);

  initial begin
    #(2 * HALF * (CYCLES + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF);
    for (int n = 0; n < CYCLES; n++) begin
      sin = 1'($urandom);
      hist[n] = sin;
      clk = 1'b1; #(HALF);
      // all pulses are over: compare in the low phase
      if (n >= SUB_BITS) begin
        for (int k = 0; k < SUB_BITS; k++) begin
          checks++;
          if (q[k] !== hist[n - k]) begin
            failures++;
            if (failures < 20) $display("FAIL cycle %0d Q%0d=%0b expected %0b", n, k + 1, q[k], hist[n - k]);
          end
        end
        checks++;
        if (t !== hist[n - SUB_BITS]) begin
          failures++;
          if (failures < 20) $display("FAIL cycle %0d T=%0b expected %0b", n, t, hist[n - SUB_BITS]);
        end
      end
      clk = 1'b0; #(HALF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

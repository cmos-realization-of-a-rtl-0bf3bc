// tb_piso_sub_shift_register: one 4-bit sub shift register with parallel
// load, driven by the delayed pulsed clock generator. Random cycles of
// parallel load (shift_load = 0) and shift (shift_load = 1) are applied and
// the latches are compared each cycle with a reference model:
// load: Q <= pdata; shift: Q1 <= sin, Qk <= Qk-1; in both: T <= old Q4.
module tb_piso_sub_shift_register;
  timeunit 1ps;
  timeprecision 1ps;
  import pulsed_sr_pkg::*;

  localparam int unsigned HALF = 2000;
  localparam int CYCLES = 400;

  logic clk = 1'b0;
  logic clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;
  logic shift_load = 1'b0, sin = 1'b0;
  logic [SUB_BITS-1:0] pdata = '0;
  logic [SUB_BITS-1:0] q, q_ref;
  logic t, t_ref;
  int checks = 0, failures = 0;
  int loads = 0, shifts = 0;

  delayed_pulsed_clock_gen u_gen (.clk, .clk_pulse_t, .clk_pulse);
  piso_sub_shift_register dut (.clk_pulse_t, .clk_pulse, .shift_load, .sin, .pdata, .q, .t);

  initial begin
    #(2 * HALF * (CYCLES + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF);
    q_ref = '0; t_ref = 1'b0;
    for (int n = 0; n < CYCLES; n++) begin
      // first cycle always loads, so every latch is known from then on
      shift_load = (n == 0) ? 1'b0 : ($urandom_range(0, 3) != 0);
      pdata = SUB_BITS'($urandom);
      sin = 1'($urandom);
      t_ref = q_ref[SUB_BITS-1];
      if (shift_load) begin
        q_ref = {q_ref[SUB_BITS-2:0], sin};
        shifts++;
      end else begin
        q_ref = pdata;
        loads++;
      end
      clk = 1'b1; #(HALF);
      checks++;
      if (q !== q_ref) begin
        failures++;
        if (failures < 20) $display("FAIL cycle %0d q=%b expected %b", n, q, q_ref);
      end
      if (n >= 1) begin
        checks++;
        if (t !== t_ref) begin
          failures++;
          if (failures < 20) $display("FAIL cycle %0d t=%b expected %b", n, t, t_ref);
        end
      end
      clk = 1'b0; #(HALF);
    end
    checks++;
    if (loads < 10 || shifts < 10) begin
      failures++;
      $display("FAIL too few loads (%0d) or shifts (%0d)", loads, shifts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

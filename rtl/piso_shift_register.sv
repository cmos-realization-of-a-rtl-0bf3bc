// piso_shift_register: N-bit parallel-in serial-out shift register built
// from pulsed latches.
//
// It is the SISO arrangement (sub shift registers of four latches, one
// temporary latch between neighbouring groups, one shared generator of five
// non-overlapping delayed pulses) with a 2:1 multiplexer in front of every
// data latch. With shift_load low, the clock cycle writes pdata into all data
// latches; with shift_load high it shifts by one position towards QN, taking
// sin into Q1. The last sub shift register has no temporary latch, because
// nothing follows it; the serial output is the last data latch QN.
//
// Interface: clk, shift_load (1 = shift, 0 = load), pdata[N-1:0]
// (pdata[0] goes to Q1, pdata[N-1] to QN), sin serial input, q[N-1:0] the
// data latches, sout = QN. Timing: shift_load, pdata and sin must be steady
// from the rising edge of clk until CLK_pulse<1> has ended. After a load at
// edge k, sout shows pdata[N-1] and, with shifting from edge k+1 on,
// pdata[N-1-j] after edge k+j. N = 8 (two sub shift registers) follows the
// design's PISO schematic; the serial input of Q1 and the shift_load
// polarity are this implementation's choices.
module piso_shift_register
  import pulsed_sr_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned DELAY_PS = DEF_DELAY_PS,
  parameter int unsigned INV_PS   = DEF_INV_PS,
  parameter int unsigned BUF_PS   = DEF_BUF_PS
) (
  input  logic          clk,
  input  logic          shift_load,
  input  logic [N-1:0]  pdata,
  input  logic          sin,
  output logic [N-1:0]  q,
  output logic          sout
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned M = N / SUB_BITS;

  initial begin
    if (N % SUB_BITS != 0 || N == 0)
      $fatal(1, "piso_shift_register: N must be a non-zero multiple of %0d", SUB_BITS);
  end

  logic              clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;
  logic [M-1:0]      t;

  delayed_pulsed_clock_gen #(
    .DELAY_PS (DELAY_PS),
    .INV_PS   (INV_PS),
    .BUF_PS   (BUF_PS)
  ) u_gen (
    .clk         (clk),
    .clk_pulse_t (clk_pulse_t),
    .clk_pulse   (clk_pulse)
  );

  for (genvar m = 0; m < M; m++) begin : g_sub
    piso_sub_shift_register #(
      .HAS_TEMP (m != M - 1)
    ) u_sub (
      .clk_pulse_t (clk_pulse_t),
      .clk_pulse   (clk_pulse),
      .shift_load  (shift_load),
      .sin         ((m == 0) ? sin : t[(m == 0) ? 0 : m-1]),
      .pdata       (pdata[m*SUB_BITS +: SUB_BITS]),
      .q           (q[m*SUB_BITS +: SUB_BITS]),
      .t           (t[m])
    );
  end

  assign sout = q[N-1];

  // The last group's t only repeats QN.
  logic unused_t_last;
  assign unused_t_last = t[M-1];
endmodule

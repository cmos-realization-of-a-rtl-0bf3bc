// siso_shift_register: N-bit serial-in shift register built from pulsed
// latches instead of flip-flops.
//
// A single pulsed clock cannot drive a chain of latches: every latch would be
// transparent at once and data would race through. Here the N data latches
// are grouped into N/4 sub shift registers of four latches each, plus one
// temporary latch per sub shift register. One delayed pulsed clock generator
// makes five non-overlapping pulses per clock cycle, <T>, <4>, <3>, <2>, <1>
// in that order, shared by all sub shift registers. Inside a sub shift
// register the latches are written from the last to the first, so each one
// copies a value that is not moving; between sub shift registers the
// temporary latch keeps the outgoing bit until the next group's first latch
// takes it at <1>. Only five pulsed clocks are needed whatever N is.
//
// Interface: clk (rising edge starts a shift), sin serial input, q[N-1:0]
// all data latches (q[0] = Q1, q[N-1] = QN; a serial-in parallel-out view),
// t[M-1:0] the temporary latches T1..TM, sout = TM the serial output.
// Timing: sin must be steady from the rising edge of clk until CLK_pulse<1>
// has ended (700 ps with the default delays). The bit present at rising
// edge k appears on q[j] after edge k+j and on sout after edge k+N.
// N = 32 (eight sub shift registers with their temporary latches) follows
// the design's 32-bit schematic; taking the last temporary latch as the
// serial output is this implementation's reading of it.
module siso_shift_register
  import pulsed_sr_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned DELAY_PS = DEF_DELAY_PS,
  parameter int unsigned INV_PS   = DEF_INV_PS,
  parameter int unsigned BUF_PS   = DEF_BUF_PS
) (
  input  logic                   clk,
  input  logic                   sin,
  output logic [N-1:0]           q,
  output logic [N/SUB_BITS-1:0]  t,
  output logic                   sout
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned M = N / SUB_BITS;

  initial begin
    if (N % SUB_BITS != 0 || N == 0)
      $fatal(1, "siso_shift_register: N must be a non-zero multiple of %0d", SUB_BITS);
  end

  logic              clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;

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
    sub_shift_register u_sub (
      .clk_pulse_t (clk_pulse_t),
      .clk_pulse   (clk_pulse),
      .sin         ((m == 0) ? sin : t[(m == 0) ? 0 : m-1]),
      .q           (q[m*SUB_BITS +: SUB_BITS]),
      .t           (t[m])
    );
  end

  assign sout = t[M-1];
endmodule

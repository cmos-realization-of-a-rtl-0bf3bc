// sub_shift_register: 4-bit sub shift register of the pulsed-latch SISO
// shift register.
//
// SUB_BITS data latches Q1..Q4 in series, latch k clocked by CLK_pulse<k>,
// followed by a temporary latch T clocked by CLK_pulse<T>. The generator fires
// <T> first, then <4>, <3>, <2>, <1>, so in each clock cycle T takes the old
// Q4, Q4 the old Q3, ..., Q1 the serial input. T then holds the bit that the
// first latch of the next sub shift register takes at its CLK_pulse<1>,
// after the next sub shift register's own Q4..Q2 have moved on. Net effect per
// clock cycle: a shift by one position, Q1 <- sin, Qk <- Qk-1, T <- Q4.
//
// The serial input comes in single-ended and is inverted once to form the
// complementary input of the first latch; inside the chain every latch feeds
// the next with its Q/Qb pair, so no further inverters are needed.
//
// Interface: clk_pulse[SUB_BITS:1], clk_pulse_t from the generator; sin the
// bit to shift in (the serial input or the previous sub shift register's T);
// q[k-1] is Qk; t is the temporary latch output. All of this follows the
// design; sub shift register width comes from the package (the design's 4).
module sub_shift_register
  import pulsed_sr_pkg::*;
(
  input  logic                clk_pulse_t,
  input  logic [SUB_BITS:1]   clk_pulse,
  input  logic                sin,
  output logic [SUB_BITS-1:0] q,
  output logic                t
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [SUB_BITS-1:0] qb;
  logic                sin_b;
  logic                tb_unused;

  assign sin_b = ~sin;

  for (genvar i = 0; i < SUB_BITS; i++) begin : g_lat
    if (i == 0) begin : g_first
      ssaspl_latch u_lat (
        .clk_pulse (clk_pulse[1]),
        .d         (sin),
        .db        (sin_b),
        .q         (q[0]),
        .qb        (qb[0])
      );
    end else begin : g_next
      ssaspl_latch u_lat (
        .clk_pulse (clk_pulse[i+1]),
        .d         (q[i-1]),
        .db        (qb[i-1]),
        .q         (q[i]),
        .qb        (qb[i])
      );
    end
  end

  ssaspl_latch u_temp (
    .clk_pulse (clk_pulse_t),
    .d         (q[SUB_BITS-1]),
    .db        (qb[SUB_BITS-1]),
    .q         (t),
    .qb        (tb_unused)
  );
endmodule

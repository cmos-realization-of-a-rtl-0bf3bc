// pulsed_latch_shift_registers: top level holding the two pulsed-latch shift
// registers of the design side by side, the serial-in serial-out register
// (SISO mode) and the parallel-in serial-out register (PISO mode).
//
// Each register has its own clock and its own delayed pulsed clock
// generator, as in the design, where the two are separate circuits; they
// share no signal. See siso_shift_register and piso_shift_register for how
// the pulsed latches are kept from racing.
//
// Interface: siso_* and piso_* ports are the ports of the two registers.
// Defaults: SISO_N = 32, PISO_N = 8, as in the design's two schematics.
module pulsed_latch_shift_registers
  import pulsed_sr_pkg::*;
#(
  parameter int unsigned SISO_N   = 32,
  parameter int unsigned PISO_N   = 8,
  parameter int unsigned DELAY_PS = DEF_DELAY_PS,
  parameter int unsigned INV_PS   = DEF_INV_PS,
  parameter int unsigned BUF_PS   = DEF_BUF_PS
) (
  // SISO shift register
  input  logic                        siso_clk,
  input  logic                        siso_in,
  output logic [SISO_N-1:0]           siso_q,
  output logic [SISO_N/SUB_BITS-1:0]  siso_t,
  output logic                        siso_out,
  // PISO shift register
  input  logic                        piso_clk,
  input  logic                        piso_shift_load,
  input  logic [PISO_N-1:0]           piso_pdata,
  input  logic                        piso_sin,
  output logic [PISO_N-1:0]           piso_q,
  output logic                        piso_out
);
  timeunit 1ps;
  timeprecision 1ps;

  siso_shift_register #(
    .N        (SISO_N),
    .DELAY_PS (DELAY_PS),
    .INV_PS   (INV_PS),
    .BUF_PS   (BUF_PS)
  ) u_siso (
    .clk  (siso_clk),
    .sin  (siso_in),
    .q    (siso_q),
    .t    (siso_t),
    .sout (siso_out)
  );

  piso_shift_register #(
    .N        (PISO_N),
    .DELAY_PS (DELAY_PS),
    .INV_PS   (INV_PS),
    .BUF_PS   (BUF_PS)
  ) u_piso (
    .clk        (piso_clk),
    .shift_load (piso_shift_load),
    .pdata      (piso_pdata),
    .sin        (piso_sin),
    .q          (piso_q),
    .sout       (piso_out)
  );
endmodule

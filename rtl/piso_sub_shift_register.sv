// piso_sub_shift_register: 4-bit sub shift register with parallel load, the
// building block of the pulsed-latch PISO shift register.
//
// Same latch chain and pulse order as sub_shift_register (T first, then
// <4> .. <1>), but each data latch is fed through a 2:1 multiplexer: with
// shift_load high it takes the bit to its left (the serial input for Q1, the
// previous data latch otherwise), with shift_load low it takes its parallel
// input bit. The multiplexer output is single-ended, so each data latch has
// its own inverter for the complementary input. The temporary latch takes Q4
// in both modes: after a load it hands the loaded Q4 to the next sub shift
// register at the next shifting cycle.
//
// With HAS_TEMP = 0 the temporary latch is left out, as in the last sub
// shift register of the PISO chain, where no sub shift register follows; t
// then simply repeats Q4.
//
// Interface: clk_pulse[SUB_BITS:1], clk_pulse_t from the generator;
// shift_load (1 = shift, 0 = parallel load), sin, pdata[k-1] the parallel
// bit of Qk; q[k-1] is Qk; t the temporary latch output. Timing: the mode
// and pdata are sampled by each latch during its own pulse, so they must be
// steady from the rising clock edge until the last pulse has ended. The
// multiplexers follow the design; the polarity of shift_load is this
// implementation's choice.
module piso_sub_shift_register
  import pulsed_sr_pkg::*;
#(
  parameter bit HAS_TEMP = 1'b1
) (
  input  logic                clk_pulse_t,
  input  logic [SUB_BITS:1]   clk_pulse,
  input  logic                shift_load,
  input  logic                sin,
  input  logic [SUB_BITS-1:0] pdata,
  output logic [SUB_BITS-1:0] q,
  output logic                t
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [SUB_BITS-1:0] qb;

  for (genvar i = 0; i < SUB_BITS; i++) begin : g_lat
    logic shifted;  // bit to the left of this latch
    logic mux_out;
    logic mux_out_b;

    if (i == 0) begin : g_first
      assign shifted = sin;
    end else begin : g_next
      assign shifted = q[i-1];
    end
    assign mux_out   = shift_load ? shifted : pdata[i];
    assign mux_out_b = ~mux_out;

    ssaspl_latch u_lat (
      .clk_pulse (clk_pulse[i+1]),
      .d         (mux_out),
      .db        (mux_out_b),
      .q         (q[i]),
      .qb        (qb[i])
    );
  end

  if (HAS_TEMP) begin : g_temp
    logic t_b_unused;
    ssaspl_latch u_temp (
      .clk_pulse (clk_pulse_t),
      .d         (q[SUB_BITS-1]),
      .db        (qb[SUB_BITS-1]),
      .q         (t),
      .qb        (t_b_unused)
    );
  end else begin : g_no_temp
    logic unused_pulse_t;
    logic unused_qb;
    assign unused_pulse_t = clk_pulse_t;
    assign unused_qb      = ^qb;
    assign t = q[SUB_BITS-1];
  end
endmodule

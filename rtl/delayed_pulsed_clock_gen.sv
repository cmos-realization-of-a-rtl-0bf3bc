// delayed_pulsed_clock_gen: delayed pulsed clock generator shared by all
// sub shift registers of one shift register.
//
// NUM_PULSES clock-pulse circuits are chained: the first takes the system
// clock and each later one takes the delayed clock of the one before. After
// every rising edge of clk the chain therefore fires one pulse per stage, in
// order and without overlap. The first stage drives CLK_pulse<T> (the
// temporary latches), the following stages drive CLK_pulse<SUB_BITS> down to
// CLK_pulse<1>: the last latch of every sub shift register is written first
// and the first latch last, so each latch copies its neighbour's old value
// before that neighbour changes.
//
// Interface: clk in; clk_pulse_t and clk_pulse[SUB_BITS:1] out
// (clk_pulse[k] is CLK_pulse<k>). Timing with the default delays: pulse i
// (i = 0 for T) starts BUF_PS + i*140 ps after the clock edge and is 120 ps
// wide, so the whole train takes 5*140 = 700 ps and the high phase of clk
// must be longer than that. Chain order and naming follow the design; the
// delay values are this implementation's choice.
module delayed_pulsed_clock_gen
  import pulsed_sr_pkg::*;
#(
  parameter int unsigned DELAY_PS = DEF_DELAY_PS,
  parameter int unsigned INV_PS   = DEF_INV_PS,
  parameter int unsigned BUF_PS   = DEF_BUF_PS
) (
  input  logic                clk,
  output logic                clk_pulse_t,
  output logic [SUB_BITS:1]   clk_pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  // clk_chain[0] is the input clock, clk_chain[i] is CLK<i>.
  logic [NUM_PULSES:0]   clk_chain;
  logic [NUM_PULSES-1:0] pulses;  // pulses[0] = <T>, pulses[i] = <SUB_BITS+1-i>

  assign clk_chain[0] = clk;

  for (genvar i = 0; i < NUM_PULSES; i++) begin : g_stage
    clock_pulse_circuit #(
      .DELAY_PS (DELAY_PS),
      .INV_PS   (INV_PS),
      .BUF_PS   (BUF_PS)
    ) u_cpc (
      .clk_in    (clk_chain[i]),
      .clk_pulse (pulses[i]),
      .clk_next  (clk_chain[i+1])
    );
  end

  assign clk_pulse_t = pulses[0];
  for (genvar k = 1; k <= SUB_BITS; k++) begin : g_map
    assign clk_pulse[k] = pulses[SUB_BITS + 1 - k];
  end

  // The delayed clock out of the last stage drives nothing.
  logic unused_clk_tail;
  assign unused_clk_tail = clk_chain[NUM_PULSES];
endmodule

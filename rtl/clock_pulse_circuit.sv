// clock_pulse_circuit: one stage of the delayed pulsed clock generator.
//
// The incoming clock passes through a delay element and an inverter; an AND
// gate combines the clock with that inverted, delayed copy, so a pulse appears
// after each rising clock edge and lasts as long as the delay element plus
// one inverter. A clock buffer drives the pulse onto its latches. A second
// inverter restores the delayed clock, which is handed to the next stage, so
// the next stage's pulse starts one inverter delay after this pulse ends:
// the pulses of a chain of stages never overlap. A falling clock edge makes
// no pulse because the delayed copy is still low then.
//
// Interface: clk_in, clk_pulse (buffered pulse), clk_next (delayed clock for
// the next stage). Timing, with the default delays: pulse width
// DELAY_PS+INV_PS = 120 ps, starting BUF_PS after the clock edge; clk_next
// rises DELAY_PS+2*INV_PS = 140 ps after clk_in. The structure (delay,
// inverter, AND gate, inverter, clock buffer) follows the design; the delay
// values are this implementation's choice. The inverter and buffer delays
// are timing annotations for simulation; a synthesis tool drops them and
// keeps the delay element as a black-box cell.
module clock_pulse_circuit #(
  parameter int unsigned DELAY_PS = pulsed_sr_pkg::DEF_DELAY_PS,
  parameter int unsigned INV_PS   = pulsed_sr_pkg::DEF_INV_PS,
  parameter int unsigned BUF_PS   = pulsed_sr_pkg::DEF_BUF_PS
) (
  input  logic clk_in,
  output logic clk_pulse,
  output logic clk_next
);
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_dly;    // clock after the delay element
  logic clk_dly_n;  // after the first inverter
  logic pulse_raw;  // AND gate output, before the clock buffer

  delay_element #(.DELAY_PS(DELAY_PS)) u_delay (
    .a (clk_in),
    .y (clk_dly)
  );

  assign #(INV_PS) clk_dly_n = ~clk_dly;
  assign #(INV_PS) clk_next  = ~clk_dly_n;
  assign pulse_raw           = clk_in & clk_dly_n;
  assign #(BUF_PS) clk_pulse = pulse_raw;
endmodule

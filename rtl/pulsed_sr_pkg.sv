// pulsed_sr_pkg: constants shared by the pulsed-latch shift registers.
//
// A sub shift register holds SUB_BITS data latches plus one temporary latch,
// so the delayed pulsed clock generator makes SUB_BITS+1 pulses per clock
// cycle. The 4-bit sub shift register and its five pulses are the design's
// own numbers. The picosecond gate delays are not given by the design; they
// are this implementation's choice and only have to keep the pulses apart
// and the whole pulse train inside the high phase of the clock.
package pulsed_sr_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Data latches per sub shift register (the design's 4-bit sub shift register).
  localparam int unsigned SUB_BITS = 4;
  // Pulses per clock cycle: CLK_pulse<1..SUB_BITS> plus CLK_pulse<T>.
  localparam int unsigned NUM_PULSES = SUB_BITS + 1;

  // Default gate delays of the pulse generator, in picoseconds (assumed).
  localparam int unsigned DEF_DELAY_PS = 100; // delay element
  localparam int unsigned DEF_INV_PS   = 20;  // each inverter
  localparam int unsigned DEF_BUF_PS   = 20;  // clock buffer

  // Width of one pulse and spacing of consecutive pulses for given delays.
  function automatic int unsigned pulse_width_ps(int unsigned delay_ps, int unsigned inv_ps);
    return delay_ps + inv_ps;
  endfunction

  function automatic int unsigned pulse_spacing_ps(int unsigned delay_ps, int unsigned inv_ps);
    return delay_ps + 2 * inv_ps;
  endfunction
endpackage

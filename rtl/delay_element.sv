// delay_element: behavioural model of the analog delay line in each
// clock-pulse circuit of the delayed pulsed clock generator.
//
// This is a behavioural model, not synthesizable logic: in silicon it is a
// chain of slow gates or an RC stage whose only job is to delay the clock by
// DELAY_PS picoseconds. The delay sets the width of every clock pulse and the
// spacing between consecutive pulses. The module carries the blackbox
// attribute so that synthesis keeps it as an external cell: a synthesis tool
// would otherwise drop the delay, see a wire, and fold every pulse AND gate
// (clock AND inverted clock) to zero. In an implementation it is replaced by
// a hand-built delay cell. The design names the element but gives no value; the 100 ps
// default is this implementation's choice.
//
// Interface: a in, y out. Timing: y follows a DELAY_PS later; like a real
// gate chain the model is inertial, so an input pulse shorter than DELAY_PS
// is swallowed. Clock phases are always longer than the delay.
(* blackbox *)
module delay_element #(
  parameter int unsigned DELAY_PS = pulsed_sr_pkg::DEF_DELAY_PS
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(DELAY_PS) y = a;
endmodule

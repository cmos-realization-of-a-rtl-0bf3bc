// ssaspl_latch: static differential sense-amp shared pulsed latch (SSASPL).
//
// The transistor cell is a pair of cross-coupled inverters (Q, Qb) with two
// pull-down transistors gated by D and Db, which share one foot transistor
// gated by the pulsed clock. While clk_pulse is high the side whose data
// input is high is pulled low: D=1 writes Q=1, Db=1 writes Q=0. While
// clk_pulse is low, or when D and Db are equal, the cross-coupled pair keeps
// its value. This module models that switch-level behaviour as a level-
// sensitive latch, so the latch it infers is intended.
//
// Interface: d/db differential data in, clk_pulse pulsed clock, q/qb
// differential data out. Timing: transparent for the width of clk_pulse, no
// internal delay. The cell and its behaviour follow the design; the rule
// that d and db differ when the pulse closes is this model's check.
// There is no reset: the cell has none.
module ssaspl_latch (
  input  logic clk_pulse,
  input  logic d,
  input  logic db,
  output logic q,
  output logic qb
);
  timeunit 1ps;
  timeprecision 1ps;

  logic state;

  // Write only when the differential input is valid (one side high).
  always_latch begin
    if (clk_pulse && (d != db)) state = d;
  end

  assign q  = state;
  assign qb = ~state;

  // The pair must be complementary when the pulse ends and the value is kept.
  a_differential_input : assert property (@(negedge clk_pulse) d != db)
    else $error("ssaspl_latch: d and db equal at end of clock pulse");
endmodule

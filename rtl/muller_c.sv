// muller_c: Muller C element with an active-low reset.
//
// The output follows the inputs when they agree and holds its value while
// they differ: it rises once both inputs are 1 and falls once both are 0.
// It joins the ring-oscillator phase with the grants of the mutual-exclusion
// elements in the stretchable clock generator. The reset, which forces the
// output to 0, is this design's addition.
//
// The state-holding behaviour is written as a level-sensitive latch; that
// latch is the C element's memory and is intended.
module muller_c (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic c
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (!rst_n)      c = 1'b0;
    else if (a == b) c = a;
  end
endmodule

// fredkin_gate: the reversible 3-input/3-output gate used as the
// "reversible multiplexer" throughout the duty cycle corrector.
//
// Function (controlled swap): P = A, Q = ~A&B | A&C, R = A&B | ~A&C.
// With A as the select line, Q is a 2:1 multiplexer output (B when A=0,
// C when A=1) and R carries the other input, so no information is lost.
// P is the garbage output that keeps the input and output counts equal.
// Purely combinational, no clock. The equations and the port names A/B/C,
// P/Q/R follow the published gate symbol.
module fredkin_gate (
  input  logic a,   // control / select
  input  logic b,
  input  logic c,
  output logic p,   // garbage output, copy of a
  output logic q,   // b when a=0, c when a=1
  output logic r    // c when a=0, b when a=1
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (a & b) | (~a & c);
  end
endmodule

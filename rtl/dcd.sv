// dcd: bang-bang duty cycle detector.
//
// With the DLL locked, Y is the inverted X delayed by X's low time, so Y
// falls exactly one low-time after X rises while X falls one high-time after
// it rises. The falling edges of X and Y therefore coincide only at 50 %
// duty. On each falling edge of X the detector samples Y: Y still high means
// X's high phase is shorter than its low phase (dcc_up, stretch the pulse);
// Y already low means the high phase is too long (dcc_down).
// Outputs are complementary levels held until the next falling edge of X.
// Reset is asynchronous, active high, and gives dcc_down. The sampling
// scheme is this design's own; the published design gives only the block's
// purpose (the DCC is locked once the duty-cycle error is gone).
module dcd (
  input  logic rst,
  input  logic x_ref,   // X
  input  logic y_fb,    // Y
  output logic dcc_up,
  output logic dcc_down
);
  timeunit 1ps; timeprecision 1ps;

  logic sample;

  always_ff @(negedge x_ref or posedge rst)
    if (rst) sample <= 1'b0;
    else     sample <= y_fb;

  assign dcc_up   = sample;
  assign dcc_down = ~sample;
endmodule

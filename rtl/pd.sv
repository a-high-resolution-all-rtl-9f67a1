// pd: bang-bang phase detector of the DLL.
//
// It compares the rising edges of the corrected clock X (reference) and the
// DLL output Y. On each rising edge of X it samples Y: Y already high means
// Y's rising edge came first, so the delay line is too short (dll_up);
// Y still low means the delay is too long (dll_down). dll_up/dll_down are
// complementary levels held until the next X rising edge; phase_s is the
// raw sample. Reset (asynchronous, active high) gives dll_down.
// Sampling Y with X is this design's choice; the published design only says the PD
// detects the phase error between X and Y and drives DLL_UP/DLL_DOWN.
module pd (
  input  logic rst,
  input  logic x_ref,   // X, reference
  input  logic y_fb,    // Y, DLL output
  output logic phase_s, // sampled Y
  output logic dll_up,
  output logic dll_down
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge x_ref or posedge rst)
    if (rst) phase_s <= 1'b0;
    else     phase_s <= y_fb;

  assign dll_up   = phase_s;
  assign dll_down = ~phase_s;
endmodule

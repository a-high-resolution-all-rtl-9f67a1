// fine_ddcc: fine duty-cycle correction stage (behavioural model).
//
// Behavioural model: the delays are SystemVerilog gate delays, which
// simulate but do not synthesise into real timing.
// The stage lengthens the high phase of its input clock by `code` fine
// steps. The clock runs down a chain of 2**CODE_W-1 buffer cells of
// STEP_PS each (one coarse step spans all fine steps, so the two stages
// make one continuous range); tap 0 is the undelayed input. The tap chosen by `code` is
// ORed with the input, so the output rises with the input and falls
// code*STEP_PS after it. The stretch must stay below the input's high time
// (else the delayed pulse starts after the input pulse ends and the output
// shows two pulses), which limits the corrector to 25 %..75 % input duty.
// A code change while the selected taps differ can shorten or lengthen one
// pulse. The published design names the block (fine DDCC after the coarse one, giving X);
// the tap-line-and-OR structure and the step size are this design's own.
module fine_ddcc
  import hr_addcc_pkg::*;
#(
  parameter int unsigned CODE_W  = FINE_W,
  parameter int unsigned STEP_PS = FINE_STEP_PS
) (
  input  logic              clk_i,   // clock to correct
  input  logic [CODE_W-1:0] code,    // number of fine steps
  output logic              clk_o    // clock with lengthened high phase
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TAPS = 1 << CODE_W;

  wire [TAPS-1:0] tap;

  assign tap[0] = clk_i;
  for (genvar i = 1; i < TAPS; i++) begin : g_cell
    assign #(STEP_PS) tap[i] = tap[i-1];
  end

  assign clk_o = clk_i | tap[code];
endmodule

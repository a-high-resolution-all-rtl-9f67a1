// hr_addcc_pkg: shared constants and types of the all-digital duty cycle
// corrector (ADDCC) built around reversible (Fredkin) multiplexers.
//
// The delay steps below are this design's own choice: they are sized so that
// one build corrects clocks around 250 MHz with 10 ps resolution. All times
// are in picoseconds (every module uses a 1 ps time unit).
package hr_addcc_pkg;
  timeunit 1ps; timeprecision 1ps;

  // DLL: NAND-based digitally controlled delay line (DCDL)
  localparam int unsigned DLL_CODE_W  = 9;    // 512 cells, 5.12 ns
  localparam int unsigned NAND_DLY_PS = 5;    // one NAND gate, a cell is two

  // DCC: coarse and fine duty-cycle correction stages
  localparam int unsigned COARSE_W       = 4;  // 16 coarse steps
  localparam int unsigned FINE_W         = 3;  // 8 fine steps
  localparam int unsigned FINE_STEP_PS   = 10;
  localparam int unsigned COARSE_STEP_PS = FINE_STEP_PS << FINE_W;  // 80 ps

  // Controller timing, in controller-clock (g_clk) cycles
  localparam int unsigned DLL_UPDATE_DIV = 4;
  localparam int unsigned DCC_UPDATE_DIV = 32;
  localparam int unsigned DLL_LOCK_REV   = 4;
  localparam int unsigned DCC_LOCK_REV   = 2;

  // One decision of a bang-bang control loop
  typedef enum logic [1:0] {
    STEP_HOLD = 2'b00,
    STEP_UP   = 2'b01,
    STEP_DOWN = 2'b10
  } step_e;

  // Turns a synchronised up/down detector pair into a step decision; the two
  // lines disagreeing with their complementary meaning gives HOLD.
  function automatic step_e decide(input logic up, input logic down);
    if (up && !down) return STEP_UP;
    if (down && !up) return STEP_DOWN;
    return STEP_HOLD;
  endfunction
endpackage

// hr_addcc: high-resolution all-digital duty cycle corrector built around
// reversible (Fredkin) multiplexers.
//
// Signal path: clk_in and its inverse clk_in_b enter the input reversible
// multiplexer, whose select duty_s picks the polarity to correct. The coarse
// and fine DDCC stages lengthen that clock's high phase to give X. The
// inverted X (i_x) goes through the NAND-based DCDL of the DLL to give Y.
// Two more reversible multiplexers hand X and Y to the phase detector (PD)
// and the duty cycle detector (DCD); their selects are tied low, so X is the
// reference and Y the compared signal. The output reversible multiplexer
// gives clk_out = Y, or ~Y when the input was inverted, so clk_out keeps the
// polarity of clk_in.
//
// Operation: the DLL controller steps the DCDL until Y's rising edges line
// up with X's, i.e. the delay equals X's low time, and raises `lock`. Then
// the DCC controller stretches X until X's falling edge meets Y's, which
// happens only when high and low time are equal, and raises ddcc_lock.
// A clock above 50 % duty is inverted first (duty_s), and the DLL relocks.
// Both controllers run on g_clk, which may be asynchronous to clk_in; dcc_rst
// is a synchronous (to g_clk), active-high reset of both loops. It also
// clears the two detectors, asynchronously, since their clock X may not be
// running; that is why the same net is used both ways.
//
// Behavioural model: the delay lines use SystemVerilog delays (1 ps unit), so the
// top simulates the real correction but does not synthesise into timing.
// The block structure and the DLL-then-DCC order follow the published
// architecture; detector schemes, controller rules, the inversion scheme,
// the delay-line structures and all sizes are this design's own.
module hr_addcc
  import hr_addcc_pkg::*;
#(
  parameter int unsigned DLL_BITS    = DLL_CODE_W,
  parameter int unsigned NAND_PS     = NAND_DLY_PS,
  parameter int unsigned COARSE_BITS = COARSE_W,
  parameter int unsigned FINE_BITS   = FINE_W,
  parameter int unsigned COARSE_PS   = COARSE_STEP_PS,
  parameter int unsigned FINE_PS     = FINE_STEP_PS,
  parameter int unsigned DLL_DIV     = DLL_UPDATE_DIV,
  parameter int unsigned DCC_DIV     = DCC_UPDATE_DIV
) (
  input  logic                   g_clk,      // controller clock
  input  logic                   dcc_rst,    // active-high reset
  input  logic                   clk_in,     // clock with duty-cycle error
  output logic                   clk_out,    // corrected clock
  output logic                   lock,       // DLL locked
  output logic                   ddcc_lock,  // DCC locked
  output logic                   duty_s,     // input clock inverted
  output logic                   phase_s,    // PD sample of Y at X rise
  output logic                   x,          // DCC output X
  output logic                   y,          // DLL output Y
  output logic [DLL_BITS-1:0]    dll_code,
  output logic [COARSE_BITS-1:0] coarse_code,
  output logic [FINE_BITS-1:0]   fine_code
);
  timeunit 1ps; timeprecision 1ps;

  logic clk_in_b, clk_sel, x_coarse, i_x, y_b;
  logic pd_ref, pd_fb, dcd_ref, dcd_fb;
  logic dll_up, dll_down, dcc_up, dcc_down, relock;
  // unused outputs of the reversible gates (kept to show every gate is
  // three-in, three-out)
  logic in_p, in_r, pd_p, dcd_p, out_p, out_r;

  assign clk_in_b = ~clk_in;

  fredkin_gate u_in_mux (
    .a(duty_s), .b(clk_in), .c(clk_in_b), .p(in_p), .q(clk_sel), .r(in_r)
  );

  coarse_ddcc #(.CODE_W(COARSE_BITS), .STEP_PS(COARSE_PS)) u_coarse (
    .clk_i(clk_sel), .code(coarse_code), .clk_o(x_coarse)
  );

  fine_ddcc #(.CODE_W(FINE_BITS), .STEP_PS(FINE_PS)) u_fine (
    .clk_i(x_coarse), .code(fine_code), .clk_o(x)
  );

  assign i_x = ~x;

  nand_dcdl #(.CODE_W(DLL_BITS), .NAND_PS(NAND_PS)) u_dcdl (
    .en(~dcc_rst), .clk_i(i_x), .code(dll_code), .clk_o(y)
  );

  fredkin_gate u_pd_mux (
    .a(1'b0), .b(x), .c(y), .p(pd_p), .q(pd_ref), .r(pd_fb)
  );

  fredkin_gate u_dcd_mux (
    .a(1'b0), .b(x), .c(y), .p(dcd_p), .q(dcd_ref), .r(dcd_fb)
  );

  pd u_pd (
    .rst(dcc_rst), .x_ref(pd_ref), .y_fb(pd_fb),
    .phase_s(phase_s), .dll_up(dll_up), .dll_down(dll_down)
  );

  dcd u_dcd (
    .rst(dcc_rst), .x_ref(dcd_ref), .y_fb(dcd_fb),
    .dcc_up(dcc_up), .dcc_down(dcc_down)
  );

  dll_ctrl #(.CODE_W(DLL_BITS), .UPDATE_DIV(DLL_DIV)) u_dll_ctrl (
    .clk(g_clk), .rst(dcc_rst), .relock(relock),
    .dll_up(dll_up), .dll_down(dll_down), .code(dll_code), .lock(lock)
  );

  dcc_ctrl #(
    .COARSE_BITS(COARSE_BITS), .FINE_BITS(FINE_BITS), .UPDATE_DIV(DCC_DIV)
  ) u_dcc_ctrl (
    .clk(g_clk), .rst(dcc_rst), .dll_lock(lock),
    .dcc_up(dcc_up), .dcc_down(dcc_down),
    .coarse_code(coarse_code), .fine_code(fine_code),
    .duty_s(duty_s), .relock(relock), .ddcc_lock(ddcc_lock)
  );

  assign y_b = ~y;

  fredkin_gate u_out_mux (
    .a(duty_s), .b(y), .c(y_b), .p(out_p), .q(clk_out), .r(out_r)
  );
endmodule

// dcc_ctrl: controller of the duty cycle correction loop.
//
// It waits for the DLL to lock, then, every UPDATE_DIV controller (g_clk)
// cycles, moves the correction code one step in the direction the duty cycle
// detector asks for. The code is COARSE_W+FINE_W bits wide: its upper bits
// set the coarse DDCC stage and its lower bits the fine stage, so the two
// stages together form one linear range of pulse stretch.
// Because the corrector can only lengthen the high phase, a clock whose duty
// cycle is above 50 % is handled by inverting it: a dcc_down request at code
// 0 sets duty_s (which selects the inverted input clock in the input
// reversible multiplexer and re-inverts the output) and pulses `relock` so
// the DLL finds the new delay before the DCC goes on.
// Direction reversals are counted as in the DLL controller; LOCK_REV
// consecutive reversals raise ddcc_lock and freeze the code.
// dcc_up/dcc_down are synchronised with two flops. Reset is synchronous,
// active high. The published design gives the order (DLL locks first, then the DCC) and
// the coarse/fine split; counter, inversion scheme, rate and lock rule are
// this design's own.
module dcc_ctrl
  import hr_addcc_pkg::*;
#(
  parameter int unsigned COARSE_BITS = COARSE_W,
  parameter int unsigned FINE_BITS   = FINE_W,
  parameter int unsigned UPDATE_DIV  = DCC_UPDATE_DIV,
  parameter int unsigned LOCK_REV    = DCC_LOCK_REV
) (
  input  logic                   clk,        // g_clk
  input  logic                   rst,
  input  logic                   dll_lock,
  input  logic                   dcc_up,     // asynchronous, from the DCD
  input  logic                   dcc_down,
  output logic [COARSE_BITS-1:0] coarse_code,
  output logic [FINE_BITS-1:0]   fine_code,
  output logic                   duty_s,     // 1: correct the inverted clock
  output logic                   relock,     // one-cycle pulse to the DLL
  output logic                   ddcc_lock
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned CODE_W = COARSE_BITS + FINE_BITS;
  localparam int unsigned DIV_W  = (UPDATE_DIV > 1) ? $clog2(UPDATE_DIV) : 1;
  localparam int unsigned REV_W  = $clog2(LOCK_REV + 1);

  logic [1:0]        up_sync, down_sync;
  logic [DIV_W-1:0]  div_cnt;
  logic [REV_W-1:0]  rev_cnt;
  logic [CODE_W-1:0] code;
  step_e             last_step, step;
  logic              tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      up_sync   <= '0;
      down_sync <= '0;
    end else begin
      up_sync   <= {up_sync[0], dcc_up};
      down_sync <= {down_sync[0], dcc_down};
    end
  end

  assign tick = dll_lock && !ddcc_lock && (div_cnt == DIV_W'(UPDATE_DIV - 1));
  assign step = decide(up_sync[1], down_sync[1]);
  assign {coarse_code, fine_code} = code;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt   <= '0;
      code      <= '0;
      rev_cnt   <= '0;
      last_step <= STEP_HOLD;
      duty_s    <= 1'b0;
      relock    <= 1'b0;
      ddcc_lock <= 1'b0;
    end else begin
      relock <= 1'b0;
      // the update timer runs only while the DLL is locked, so the first
      // decision after (re)lock comes a full period later
      if (!dll_lock || tick) div_cnt <= '0;
      else                   div_cnt <= div_cnt + 1'b1;
      if (tick && step != STEP_HOLD) begin
        if (step == STEP_DOWN && code == '0 && !duty_s) begin
          duty_s    <= 1'b1;
          relock    <= 1'b1;
          rev_cnt   <= '0;
          last_step <= STEP_HOLD;
        end else begin
          if (step == STEP_UP && code != '1) code <= code + 1'b1;
          if (step == STEP_DOWN && code != '0) code <= code - 1'b1;
          last_step <= step;
          if (last_step != STEP_HOLD && last_step != step) begin
            if (rev_cnt == REV_W'(LOCK_REV - 1)) ddcc_lock <= 1'b1;
            if (rev_cnt != REV_W'(LOCK_REV)) rev_cnt <= rev_cnt + 1'b1;
          end else begin
            rev_cnt <= '0;
          end
        end
      end
    end
  end
endmodule

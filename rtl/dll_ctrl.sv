// dll_ctrl: up/down counter that sets the delay code of the DLL's NAND delay
// line, with lock detection.
//
// The phase detector's dll_up/dll_down lines come from the X clock domain and
// are brought into the controller clock (g_clk) domain by two-flop
// synchronisers. Every UPDATE_DIV controller cycles the code moves one step
// up or down (saturating at 0 and at its maximum). The loop is bang-bang, so
// once the delay matches it dithers by one step: each reversal of direction
// is counted, a step in the same direction clears the count, and LOCK_REV
// consecutive reversals raise `lock`. Lock stays up (the loop keeps tracking)
// until `relock` or reset; `relock` is used when the DCC inverts its input
// clock and the delay has to be found again. Reset is synchronous, active
// high, and starts the code at 0 so the DLL never locks to a whole period.
// Counter, synchronisers, the update rate and the lock rule are this design's
// choices; the published design says only that the controller aligns the phase and that
// the DLL locks when the phase error is gone.
module dll_ctrl
  import hr_addcc_pkg::*;
#(
  parameter int unsigned CODE_W     = DLL_CODE_W,
  parameter int unsigned UPDATE_DIV = DLL_UPDATE_DIV,
  parameter int unsigned LOCK_REV   = DLL_LOCK_REV
) (
  input  logic              clk,       // g_clk
  input  logic              rst,
  input  logic              relock,    // one-cycle request to drop lock
  input  logic              dll_up,    // asynchronous, from the PD
  input  logic              dll_down,
  output logic [CODE_W-1:0] code,
  output logic              lock
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DIV_W = (UPDATE_DIV > 1) ? $clog2(UPDATE_DIV) : 1;
  localparam int unsigned REV_W = $clog2(LOCK_REV + 1);

  logic [1:0]       up_sync, down_sync;
  logic [DIV_W-1:0] div_cnt;
  logic [REV_W-1:0] rev_cnt;
  step_e            last_step, step;
  logic             tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      up_sync   <= '0;
      down_sync <= '0;
    end else begin
      up_sync   <= {up_sync[0], dll_up};
      down_sync <= {down_sync[0], dll_down};
    end
  end

  assign tick = (div_cnt == DIV_W'(UPDATE_DIV - 1));
  assign step = decide(up_sync[1], down_sync[1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt   <= '0;
      code      <= '0;
      rev_cnt   <= '0;
      last_step <= STEP_HOLD;
      lock      <= 1'b0;
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (relock) begin
        lock      <= 1'b0;
        rev_cnt   <= '0;
        last_step <= STEP_HOLD;
      end else if (tick && step != STEP_HOLD) begin
        if (step == STEP_UP && code != '1) code <= code + 1'b1;
        if (step == STEP_DOWN && code != '0) code <= code - 1'b1;
        last_step <= step;
        if (last_step != STEP_HOLD && last_step != step) begin
          if (rev_cnt == REV_W'(LOCK_REV - 1)) lock <= 1'b1;
          if (rev_cnt != REV_W'(LOCK_REV)) rev_cnt <= rev_cnt + 1'b1;
        end else begin
          rev_cnt <= '0;
        end
      end
    end
  end
endmodule

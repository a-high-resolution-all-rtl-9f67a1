// nand_dcdl: NAND-based digitally controlled delay line of the DLL
// (behavioural model).
//
// Behavioural model: the delay is a SystemVerilog transport delay, which
// simulates but does not synthesise into real timing.
// The modelled line is made of 2**CODE_W-1 cells, each two NAND gates of
// NAND_PS in series with their second inputs on `en`, and a NAND-NAND
// selector that picks the cell output named by the binary `code`. The
// selector adds two NAND delays, so the delay from clk_i to clk_o is
//   (2*code + 2) * NAND_PS
// and the resolution is one cell, 2*NAND_PS. The model applies that delay to
// every edge as a transport delay instead of simulating each gate: edges
// wait in a small queue with their departure times, and an edge already in
// flight keeps the delay it started with when `code` changes.
// With en low the line stops switching and clk_o goes low. The model has no
// reset: its queue counters start from their declared values.
// The published design only names a NAND-based DCDL in the DLL; cell, selector and
// sizes here are this design's own.
module nand_dcdl
  import hr_addcc_pkg::*;
#(
  parameter int unsigned CODE_W  = DLL_CODE_W,
  parameter int unsigned NAND_PS = NAND_DLY_PS
) (
  input  logic              en,
  input  logic              clk_i,
  input  logic [CODE_W-1:0] code,
  output logic              clk_o
);
  timeunit 1ps; timeprecision 1ps;

  // Edges in flight: the longest delay over the shortest half period, with
  // margin (5.12 ns over 0.5 ns at the default sizes).
  localparam int unsigned DEPTH = 32;

  int unsigned delay_ps;
  realtime     due [DEPTH];         // when each pending edge leaves
  logic        lvl [DEPTH];         // the level it carries
  int unsigned wr = 0, rd = 0;      // free-running write/read counts
  realtime     last_due = 0.0;

  always_comb delay_ps = (2 * int'(code) + 2) * NAND_PS;

  // Every input edge is queued with its departure time. If the code shrinks
  // while edges are in flight, an edge leaves no earlier than the one before
  // it, so edges never overtake each other.
  always @(clk_i, en) begin
    realtime t;
    t = $realtime + delay_ps;
    if (t < last_due) t = last_due;
    last_due = t;
    assert (wr - rd < DEPTH) else $error("nand_dcdl: too many edges in flight");
    due[wr % DEPTH] = t;
    lvl[wr % DEPTH] = clk_i & en;
    wr = wr + 1;
  end

  always begin
    wait (rd != wr);
    #(due[rd % DEPTH] - $realtime);
    clk_o = lvl[rd % DEPTH];
    rd = rd + 1;
  end
endmodule

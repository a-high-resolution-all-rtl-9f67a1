// tb_fredkin_gate: exhaustive check of the Fredkin gate against its truth
// table (eight rows, inputs A B C, outputs P Q R), typed in below as
// constants rather than computed from the gate's equations. The table is
// that of P = A, Q = ~A&B | A&C, R = A&B | ~A&C: A=0 passes B and C
// straight through, A=1 swaps them.
module tb_fredkin_gate;
  timeunit 1ps; timeprecision 1ps;

  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  // row i = {A,B,C}; value = {P,Q,R}
  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111
  };

  fredkin_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #10;
      checks++;
      if ({p, q, r} !== TABLE[i]) begin
        failures++;
        $display("FAIL: ABC=%03b gave PQR=%03b, expected %03b", 3'(i), {p, q, r}, TABLE[i]);
      end
      // reversibility: as a multiplexer Q selects, R keeps the other input
      checks++;
      if ((a ? c : b) !== q || (a ? b : c) !== r) begin
        failures++;
        $display("FAIL: ABC=%03b is not a controlled swap", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

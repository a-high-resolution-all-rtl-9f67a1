// tb_dcd: checks the bang-bang duty cycle detector.
//
// X is a 4 ns clock with a chosen high time; Y rises with X and falls 2 ns
// (half a period) after X rises, which is what a locked DLL gives for a
// clock whose low time is 2 ns. X's high time below 2 ns (Y falls after X)
// must give dcc_up, above 2 ns dcc_down. The test also checks the outputs
// are complementary and that reset gives dcc_down.
module tb_dcd;
  timeunit 1ps; timeprecision 1ps;

  logic rst = 1'b0, x = 1'b0, y = 1'b0;
  logic dcc_up, dcc_down;
  int checks = 0, failures = 0;
  int high_ps = 2000;

  dcd dut (.rst, .x_ref(x), .y_fb(y), .dcc_up, .dcc_down);

  initial forever begin
    fork
      begin x = 1'b1; #(high_ps) x = 1'b0; end
      begin y = 1'b1; #2000 y = 1'b0; end
    join
    #(4000 - high_ps);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    static int highs [8] = '{1200, 1900, 1990, 1999, 2001, 2010, 2100, 2800};
    #5 rst = 1'b1;
    #5;
    check(dcc_down && !dcc_up, "reset does not give dcc_down");
    rst = 1'b0;
    foreach (highs[i]) begin
      high_ps = highs[i];
      repeat (4) @(negedge x);
      #1;
      check(dcc_up == (highs[i] < 2000), $sformatf("high time %0d ps gave dcc_up=%0b", highs[i], dcc_up));
      check(dcc_down == !dcc_up, "outputs not complementary");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

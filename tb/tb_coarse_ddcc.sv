// tb_coarse_ddcc: checks the coarse duty-cycle correction stage at every code.
//
// A 4 ns clock with a 1.3 ns high phase is applied. For each code the test
// waits for the line to settle and then measures one output pulse: it must
// rise with the input (within 1 ps) and stay high for 1.3 ns + code*80 ps (the longest stretch,
// 1.2 ns, stays below the input high time, as the stage requires).
module tb_coarse_ddcc;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 4;
  localparam int STEP = 80;

  logic clk_i = 1'b0, clk_o;
  logic [W-1:0] code = '0;
  int checks = 0, failures = 0;

  coarse_ddcc dut (.clk_i, .code, .clk_o);

  initial forever begin
    #2700 clk_i = 1'b1;
    #1300 clk_i = 1'b0;
  end

  realtime t_in, t_rise, t_fall;
  always @(posedge clk_i) t_in = $realtime;
  always @(posedge clk_o) t_rise = $realtime;

  initial begin
    for (int k = 0; k < (1 << W); k++) begin
      @(negedge clk_i);
      code = W'(k);
      repeat (2) @(negedge clk_i);
      @(posedge clk_i);
      @(negedge clk_o) t_fall = $realtime;
      checks++;
      if (t_rise - t_in > 1.0 || t_rise < t_in) begin
        failures++;
        $display("FAIL: code %0d output rose %0.1f ps late", k, t_rise - t_in);
      end
      checks++;
      if (t_fall - t_rise < 1300.0 + k * STEP - 1.0 || t_fall - t_rise > 1300.0 + k * STEP + 1.0) begin
        failures++;
        $display("FAIL: code %0d high time %0.1f ps, expected %0d", k, t_fall - t_rise, 1300 + k * STEP);
      end
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

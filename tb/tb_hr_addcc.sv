// tb_hr_addcc: end-to-end test of the duty cycle corrector at its default
// sizes.
//
// A 250 MHz clock is fed in with a duty cycle below 50 % (corrected directly)
// and, after a reset, with one above 50 % (the corrector must invert it and
// relock its DLL first). For each case the test waits for the DLL lock and
// then the DCC lock, checks that they come in that order, and measures the
// output over 32 periods: its period must equal the input's and its high time
// must be half a period within DUTY_TOL_PS. A third case runs at 1 GHz.
// The mechanisms of the design (DLL lock, DCC lock, input inversion, DLL
// relock, use of coarse and of fine steps) are counted; one that never
// happened is a failure. g_clk is 8.13 ns, asynchronous to the input.
module tb_hr_addcc;
  timeunit 1ps; timeprecision 1ps;

  localparam int DUTY_TOL_PS = 40;

  logic g_clk = 1'b0, dcc_rst = 1'b1, clk_in = 1'b0;
  logic clk_out, lock, ddcc_lock, duty_s, phase_s, x, y;
  logic [8:0] dll_code;
  logic [3:0] coarse_code;
  logic [2:0] fine_code;

  int checks = 0, failures = 0;
  int n_dll_lock = 0, n_dcc_lock = 0, n_invert = 0, n_relock = 0;
  int n_coarse = 0, n_fine = 0;

  int period_ps = 4000, high_ps = 1600;

  hr_addcc dut (
    .g_clk, .dcc_rst, .clk_in, .clk_out, .lock, .ddcc_lock, .duty_s, .phase_s,
    .x, .y, .dll_code, .coarse_code, .fine_code
  );

  always #4065 g_clk = ~g_clk;

  initial forever begin
    clk_in = 1'b1; #(high_ps);
    clk_in = 1'b0; #(period_ps - high_ps);
  end

  // mechanism counters
  always @(posedge lock)      n_dll_lock++;
  always @(posedge ddcc_lock) n_dcc_lock++;
  always @(posedge duty_s)    n_invert++;
  always @(negedge lock) if (!dcc_rst) n_relock++;
  always @(posedge g_clk) begin
    if (coarse_code != 0) n_coarse++;
    if (fine_code != 0)   n_fine++;
  end

  // order rule: the DCC never locks before the DLL
  always @(posedge ddcc_lock) begin
    checks++;
    if (!lock) begin
      failures++;
      $display("FAIL: DCC locked while the DLL was not locked");
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_case(input int per, input int hi, input bit expect_inv);
    realtime t_rise0, t_rise, t_fall, t_prev;
    realtime sum_hi = 0.0;
    realtime avg_hi, avg_per;
    period_ps = per;
    high_ps   = hi;
    dcc_rst   = 1'b1;
    repeat (4) @(posedge g_clk);
    dcc_rst = 1'b0;
    wait (ddcc_lock);
    check(lock, "DLL lock missing at DCC lock");
    check(duty_s == expect_inv, $sformatf("duty_s=%0b, expected %0b", duty_s, expect_inv));
    repeat (20) @(posedge clk_out);
    @(posedge clk_out); t_rise0 = $realtime;
    t_prev = t_rise0;
    t_rise = t_rise0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk_out); t_fall = $realtime;
      sum_hi += t_fall - t_prev;
      @(posedge clk_out); t_rise = $realtime;
      t_prev = t_rise;
    end
    avg_per = (t_rise - t_rise0) / 32.0;
    avg_hi  = sum_hi / 32.0;
    $display("case T=%0d high=%0d: clk_out period %0.1f ps, high %0.1f ps (%0.2f %%), dll_code=%0d dcc_code=%0d/%0d duty_s=%0b at %0t",
             per, hi, avg_per, avg_hi, 100.0 * avg_hi / avg_per, dll_code,
             coarse_code, fine_code, duty_s, $time);
    check(avg_per > per - 2.0 && avg_per < per + 2.0, "output period differs from input period");
    check(avg_hi > per / 2.0 - DUTY_TOL_PS && avg_hi < per / 2.0 + DUTY_TOL_PS,
          "output duty cycle not corrected to 50 %");
  endtask

  initial begin
    run_case(4000, 1600, 1'b0);   // 40 % duty
    run_case(4000, 2600, 1'b1);   // 65 % duty
    run_case(1000,  420, 1'b0);   // 1 GHz, 42 %
    check(n_dll_lock > 0, "DLL never locked");
    check(n_dcc_lock > 0, "DCC never locked");
    check(n_invert > 0,   "input inversion never used");
    check(n_relock > 0,   "DLL relock never happened");
    check(n_coarse > 0,   "coarse steps never used");
    check(n_fine > 0,     "fine steps never used");
    $display("mechanisms: dll_lock=%0d dcc_lock=%0d invert=%0d relock=%0d coarse=%0d fine=%0d",
             n_dll_lock, n_dcc_lock, n_invert, n_relock, n_coarse, n_fine);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;  // 400 us watchdog
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

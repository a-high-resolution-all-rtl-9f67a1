// tb_hr_addcc_sweep: runs the duty cycle corrector, at its default sizes,
// over its operating range: input clocks of 250, 400, 500, 667, 800 and
// 1000 MHz, each at 30 %, 45 %, 55 % and 70 % duty. For every point it
// resets the corrector, waits for the DCC lock (counting a failure if it
// does not come within 200 us), and checks over 16 periods that the output
// period equals the input's and the high time is half a period within 40 ps.
// It also checks that the input was inverted exactly for the points above
// 50 %.
module tb_hr_addcc_sweep;
  timeunit 1ps; timeprecision 1ps;

  localparam int DUTY_TOL_PS = 40;

  logic g_clk = 1'b0, dcc_rst = 1'b1, clk_in = 1'b0;
  logic clk_out, lock, ddcc_lock, duty_s, phase_s, x, y;
  logic [8:0] dll_code;
  logic [3:0] coarse_code;
  logic [2:0] fine_code;

  int checks = 0, failures = 0;
  int period_ps = 4000, high_ps = 2000;

  hr_addcc dut (
    .g_clk, .dcc_rst, .clk_in, .clk_out, .lock, .ddcc_lock, .duty_s, .phase_s,
    .x, .y, .dll_code, .coarse_code, .fine_code
  );

  always #4065 g_clk = ~g_clk;

  initial forever begin
    clk_in = 1'b1; #(high_ps);
    clk_in = 1'b0; #(period_ps - high_ps);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_point(input int per, input int duty_pct);
    realtime t_rise0, t_prev, t_fall, t_rise;
    realtime sum_hi = 0.0, avg_hi, avg_per;
    bit locked = 1'b0;
    period_ps = per;
    high_ps   = per * duty_pct / 100;
    dcc_rst   = 1'b1;
    repeat (4) @(posedge g_clk);
    dcc_rst = 1'b0;
    fork
      begin wait (ddcc_lock); locked = 1'b1; end
      #200_000_000;
    join_any
    disable fork;
    check(locked, $sformatf("T=%0d ps duty %0d %%: no DCC lock", per, duty_pct));
    if (!locked) return;
    check(duty_s == (duty_pct > 50), $sformatf("T=%0d ps duty %0d %%: duty_s=%0b", per, duty_pct, duty_s));
    repeat (20) @(posedge clk_out);
    @(posedge clk_out); t_rise0 = $realtime;
    t_prev = t_rise0;
    t_rise = t_rise0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk_out); t_fall = $realtime;
      sum_hi += t_fall - t_prev;
      @(posedge clk_out); t_rise = $realtime;
      t_prev = t_rise;
    end
    avg_per = (t_rise - t_rise0) / 16.0;
    avg_hi  = sum_hi / 16.0;
    $display("T=%0d ps duty %0d %% -> clk_out %0.2f %% (period %0.1f ps), dll_code=%0d dcc_code=%0d/%0d duty_s=%0b",
             per, duty_pct, 100.0 * avg_hi / avg_per, avg_per, dll_code, coarse_code, fine_code, duty_s);
    check(avg_per > per - 2.0 && avg_per < per + 2.0, $sformatf("T=%0d ps duty %0d %%: output period %0.1f", per, duty_pct, avg_per));
    check(avg_hi > per / 2.0 - DUTY_TOL_PS && avg_hi < per / 2.0 + DUTY_TOL_PS,
          $sformatf("T=%0d ps duty %0d %%: output high time %0.1f ps", per, duty_pct, avg_hi));
  endtask

  initial begin
    static int periods [6] = '{4000, 2500, 2000, 1500, 1250, 1000};
    static int duties [4]  = '{30, 45, 55, 70};
    foreach (periods[i])
      foreach (duties[j])
        run_point(periods[i], duties[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #6_000_000_000;  // 6 ms watchdog
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

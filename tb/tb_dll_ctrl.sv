// tb_dll_ctrl: checks the DLL controller at its default sizes.
//
// 1. A steady dll_up must raise the code by exactly one every 4 cycles.
// 2. A model of the delay line (dll_up while code < TARGET, else dll_down)
//    must make the controller lock, with the code within one step of TARGET,
//    and keep it there.
// 3. relock must drop lock on the next cycle; the loop must lock again.
// 4. A steady dll_down must take the code to 0 and hold it there, and a
//    steady dll_up must stop at the maximum code (no wrap-around).
module tb_dll_ctrl;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 9, DIV = 4, TARGET = 37;

  logic clk = 1'b0, rst = 1'b1, relock = 1'b0;
  logic dll_up = 1'b0, dll_down = 1'b1, use_model = 1'b0;
  logic [W-1:0] code;
  logic lock;
  int checks = 0, failures = 0;
  int cycle = 0;

  dll_ctrl dut (.clk, .rst, .relock, .dll_up, .dll_down, .code, .lock);

  always #5000 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // delay line model: the phase detector sees the new code shortly after
  // it changes
  always @(code) if (use_model) begin
    dll_up   <= (int'(code) < TARGET);
    dll_down <= !(int'(code) < TARGET);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int last_cycle, prev;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // 1. rate
    dll_up = 1'b1; dll_down = 1'b0;
    @(code); last_cycle = cycle; prev = int'(code);
    for (int i = 0; i < 10; i++) begin
      @(code);
      check(int'(code) == prev + 1, $sformatf("code stepped %0d -> %0d", prev, code));
      check(cycle - last_cycle == DIV, $sformatf("step after %0d cycles, expected %0d", cycle - last_cycle, DIV));
      last_cycle = cycle; prev = int'(code);
    end
    check(!lock, "locked while only stepping up");
    // 2. lock on the model
    use_model = 1'b1;
    dll_up   <= (int'(code) < TARGET);
    dll_down <= !(int'(code) < TARGET);
    fork
      wait (lock);
      repeat (2000) @(posedge clk);
    join_any
    disable fork;
    check(lock, "no lock on the delay line model");
    check(int'(code) >= TARGET - 2 && int'(code) <= TARGET + 1, $sformatf("locked at code %0d, target %0d", code, TARGET));
    repeat (200) begin
      @(posedge clk);
      check(lock && int'(code) >= TARGET - 2 && int'(code) <= TARGET + 1, $sformatf("lost track: code %0d lock %0b", code, lock));
    end
    // 3. relock
    @(negedge clk) relock = 1'b1;
    @(negedge clk) relock = 1'b0;
    check(!lock, "relock did not drop lock");
    fork
      wait (lock);
      repeat (2000) @(posedge clk);
    join_any
    disable fork;
    check(lock, "no lock after relock");
    // 4. saturation
    use_model = 1'b0;
    dll_up = 1'b0; dll_down = 1'b1;
    repeat (DIV * (TARGET + 10)) @(posedge clk);
    check(code == '0, $sformatf("code %0d did not stop at 0", code));
    dll_up = 1'b1; dll_down = 1'b0;
    repeat (DIV * ((1 << W) + 10)) @(posedge clk);
    check(code == '1, $sformatf("code %0d did not stop at the maximum", code));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

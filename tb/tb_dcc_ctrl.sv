// tb_dcc_ctrl: checks the DCC controller at its default sizes.
//
// 1. Without DLL lock the code must not move.
// 2. With lock and a steady dcc_up the code (coarse*8 + fine) must rise by
//    one every 32 cycles, the fine part carrying into the coarse part.
// 3. A duty-cycle model (dcc_up while code < TARGET) must make it lock near
//    TARGET and then freeze the code, whatever the detector says.
// 4. After reset, dcc_down at code 0 must set duty_s and pulse relock for
//    exactly one cycle; after the DLL relocks, the loop must lock again with
//    duty_s still set.
module tb_dcc_ctrl;
  timeunit 1ps; timeprecision 1ps;

  localparam int DIV = 32, TARGET = 21, TARGET2 = 9;

  logic clk = 1'b0, rst = 1'b1, dll_lock = 1'b0;
  logic dcc_up = 1'b0, dcc_down = 1'b1, use_model = 1'b0;
  logic [3:0] coarse_code;
  logic [2:0] fine_code;
  logic duty_s, relock, ddcc_lock;
  int checks = 0, failures = 0;
  int cycle = 0, target = TARGET, relock_pulses = 0, relock_len = 0;

  dcc_ctrl dut (.clk, .rst, .dll_lock, .dcc_up, .dcc_down, .coarse_code,
                .fine_code, .duty_s, .relock, .ddcc_lock);

  function automatic int value();
    return int'(coarse_code) * 8 + int'(fine_code);
  endfunction

  always #5000 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (relock) relock_len <= relock_len + 1;
  end
  always @(posedge relock) relock_pulses++;

  always @(coarse_code, fine_code) if (use_model) begin
    dcc_up   <= (value() < target);
    dcc_down <= !(value() < target);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic wait_lock(input int max_cycles);
    fork
      wait (ddcc_lock);
      repeat (max_cycles) @(posedge clk);
    join_any
    disable fork;
  endtask

  initial begin
    int last_cycle, prev;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // 1. waits for the DLL
    dcc_up = 1'b1; dcc_down = 1'b0;
    repeat (200) @(posedge clk);
    check(value() == 0, "code moved without DLL lock");
    // 2. rate and coarse/fine carry
    dll_lock = 1'b1;
    @(coarse_code, fine_code); last_cycle = cycle; prev = value();
    for (int i = 0; i < 10; i++) begin
      @(coarse_code, fine_code);
      check(value() == prev + 1, $sformatf("code stepped %0d -> %0d", prev, value()));
      check(cycle - last_cycle == DIV, $sformatf("step after %0d cycles, expected %0d", cycle - last_cycle, DIV));
      last_cycle = cycle; prev = value();
    end
    check(coarse_code == 4'd1, "no carry from fine into coarse");
    // 3. lock and freeze
    use_model = 1'b1;
    dcc_up   <= (value() < target);
    dcc_down <= !(value() < target);
    wait_lock(DIV * 100);
    check(ddcc_lock, "no DCC lock on the duty model");
    check(value() >= TARGET - 1 && value() <= TARGET, $sformatf("locked at %0d, target %0d", value(), TARGET));
    check(!duty_s, "duty_s set for a clock below 50 %");
    prev = value();
    use_model = 1'b0;
    dcc_up = 1'b1; dcc_down = 1'b0;
    repeat (DIV * 10) @(posedge clk);
    check(value() == prev, "code moved after DCC lock");
    // 4. inversion
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    relock_pulses = 0; relock_len = 0;
    dcc_up = 1'b0; dcc_down = 1'b1;
    wait (relock);
    @(negedge clk) dll_lock = 1'b0;   // the DLL drops lock on relock
    check(duty_s, "duty_s not set on dcc_down at code 0");
    target = TARGET2;
    use_model = 1'b1;
    dcc_up   <= (value() < target);
    dcc_down <= !(value() < target);
    repeat (100) @(posedge clk);
    check(value() == 0, "code moved while the DLL relocks");
    dll_lock = 1'b1;
    wait_lock(DIV * 100);
    check(ddcc_lock, "no DCC lock after inversion");
    check(duty_s, "duty_s lost");
    check(value() >= TARGET2 - 1 && value() <= TARGET2, $sformatf("locked at %0d, target %0d", value(), TARGET2));
    check(relock_pulses == 1 && relock_len == 1, $sformatf("relock pulses %0d, cycles high %0d", relock_pulses, relock_len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

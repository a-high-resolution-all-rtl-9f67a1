// tb_pd: checks the bang-bang phase detector.
//
// X is a 4 ns clock; Y is the same clock shifted by an offset. An offset
// that makes Y rise before X must give dll_up (Y high at X's rising edge),
// one that makes Y rise after X must give dll_down. The test sweeps offsets
// on both sides, checks the outputs stay complementary and that reset gives
// dll_down.
module tb_pd;
  timeunit 1ps; timeprecision 1ps;

  logic rst = 1'b0, x = 1'b0, y = 1'b0;
  logic phase_s, dll_up, dll_down;
  int checks = 0, failures = 0;
  int lead_ps = 0;   // positive: Y rises this much before X

  pd dut (.rst, .x_ref(x), .y_fb(y), .phase_s, .dll_up, .dll_down);

  // X rises at 4000*n + 2000, high for 2000
  initial forever begin
    #2000 x = 1'b1;
    #2000 x = 1'b0;
  end
  // Y rises at 4000*n + 2000 - lead_ps (lead_ps kept within +-1000)
  initial forever begin
    automatic int l = lead_ps;
    #(2000 - l) y = 1'b1;
    #2000       y = 1'b0;
    #(l);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    static int offs [8] = '{500, 50, 5, 1, -1, -5, -50, -500};
    #5 rst = 1'b1;
    #5;
    check(dll_down && !dll_up, "reset does not give dll_down");
    rst = 1'b0;
    foreach (offs[i]) begin
      lead_ps = offs[i];
      repeat (4) @(posedge x);
      #1;
      check(dll_up == (offs[i] > 0), $sformatf("offset %0d ps gave dll_up=%0b", offs[i], dll_up));
      check(dll_down == !dll_up, "outputs not complementary");
      check(phase_s == dll_up, "phase_s differs from dll_up");
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

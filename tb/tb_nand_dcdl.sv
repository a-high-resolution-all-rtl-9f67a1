// tb_nand_dcdl: checks the delay of the DLL delay line model.
//
// For a spread of codes, rising and falling edges of a 4 ns clock must come
// out (2*code+2)*5 ps later. With the longest code and a 1 GHz clock several
// edges are in flight at once; every output edge must still follow its input
// edge by the same delay. With en low the output must stay low.
module tb_nand_dcdl;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 9;
  localparam int NAND = 5;

  logic en = 1'b1, clk_i = 1'b0, clk_o;
  logic [W-1:0] code = '0;
  int checks = 0, failures = 0;
  int half = 2000;

  nand_dcdl dut (.en, .clk_i, .code, .clk_o);

  initial forever #(half) clk_i = ~clk_i;

  task automatic measure(input int k);
    realtime t_in, t_out;
    int exp_dly;
    exp_dly = (2 * k + 2) * NAND;
    @(posedge clk_i) t_in = $realtime;
    @(posedge clk_o) t_out = $realtime;
    // the output edge seen may belong to an earlier input edge when the
    // delay exceeds a half period; step back whole periods
    while (t_out - t_in < exp_dly - half) t_out += 2 * half;
    checks++;
    if (t_out - t_in < exp_dly - 0.5 || t_out - t_in > exp_dly + 0.5) begin
      failures++;
      $display("FAIL: code %0d rising delay %0.1f ps, expected %0d", k, t_out - t_in, exp_dly);
    end
    @(negedge clk_i) t_in = $realtime;
    @(negedge clk_o) t_out = $realtime;
    while (t_out - t_in < exp_dly - half) t_out += 2 * half;
    checks++;
    if (t_out - t_in < exp_dly - 0.5 || t_out - t_in > exp_dly + 0.5) begin
      failures++;
      $display("FAIL: code %0d falling delay %0.1f ps, expected %0d", k, t_out - t_in, exp_dly);
    end
  endtask

  initial begin
    static int codes [6] = '{0, 1, 7, 100, 199, 300};
    foreach (codes[i]) begin
      code = W'(codes[i]);
      repeat (3) @(posedge clk_i);
      measure(codes[i]);
    end
    // many edges in flight: 1 GHz clock, 5.12 ns delay
    half = 500;
    code = '1;
    repeat (20) @(posedge clk_i);
    for (int i = 0; i < 4; i++) measure((1 << W) - 1);
    // disabled line
    en = 1'b0;
    repeat (20) @(posedge clk_i);
    for (int i = 0; i < 20; i++) begin
      @(clk_i);
      checks++;
      if (clk_o !== 1'b0) begin
        failures++;
        $display("FAIL: output toggles with en low");
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

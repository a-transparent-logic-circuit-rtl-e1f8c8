// tb_clock_generator: measures the three clock outputs of the ring
// oscillator model at its default stage delay. Per period of CLK#1 it checks
// the period (18 stage delays), the high time (9 stage delays), that CLK#3
// rises 120 degrees (6 stage delays) and CLK#2 240 degrees (12 stage delays)
// after CLK#1, and that the frequency is 3.2 kHz within 1%.
`timescale 1ns / 1ps
module tb_clock_generator;
  localparam int unsigned D = 17361;           // stage delay, ns
  int checks = 0, failures = 0;
  logic clk1, clk2, clk3;
  realtime t1_rise, t1_prev, t1_fall, t2_rise, t3_rise;

  clock_generator dut (.clk1(clk1), .clk2(clk2), .clk3(clk3));

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    real freq_hz;
    @(posedge clk1);
    t1_prev = $realtime;
    for (int n = 0; n < 10; n++) begin
      fork
        begin @(posedge clk1); t1_rise = $realtime; end
        begin @(negedge clk1); t1_fall = $realtime; end
        begin @(posedge clk2); t2_rise = $realtime; end
        begin @(posedge clk3); t3_rise = $realtime; end
      join
      check(t1_rise - t1_prev == 18.0 * D, $sformatf("period %0t", t1_rise - t1_prev));
      check(t1_fall - t1_prev == 9.0 * D, "high time is half the period");
      check(t3_rise - t1_prev == 6.0 * D, "CLK#3 lags CLK#1 by 120 degrees");
      check(t2_rise - t1_prev == 12.0 * D, "CLK#2 lags CLK#1 by 240 degrees");
      freq_hz = 1.0e9 / (t1_rise - t1_prev);
      check(freq_hz > 3168.0 && freq_hz < 3232.0, $sformatf("frequency %f Hz", freq_hz));
      t1_prev = t1_rise;
    end
    $display("CLK#1 frequency %0.1f Hz", freq_hz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_manchester_encoder: drives the three clocks as six 60-degree steps per
// period (CLK#1 high in steps 0-2, CLK#3 in 2-4, CLK#2 in 4-0) and new random
// rom_data and enb at each CLK#1 rising edge. Each period's output must be
// "10" for data 0, "01" for data 1 and "00" while enb is 1: the first half is
// read in step 3, the second at the next step 0. mc_clk must rise twice per
// CLK#1 period.
`timescale 1ns / 1ps
module tb_manchester_encoder;
  int checks = 0, failures = 0;
  int n_zero = 0, n_one = 0, n_off = 0;
  logic clk1 = 1'b0, clk2 = 1'b0, clk3 = 1'b0, rst_n = 1'b0;
  logic rom_data = 1'b0, enb = 1'b1;
  logic mc_data, mc_clk, rfid_out;
  int mc_rises = 0;

  manchester_encoder dut (.clk1(clk1), .clk2(clk2), .clk3(clk3), .rst_n(rst_n),
                          .rom_data(rom_data), .enb(enb), .mc_data(mc_data),
                          .mc_clk(mc_clk), .rfid_out(rfid_out));

  always @(posedge mc_clk) mc_rises++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int p);
    clk1 = (p <= 2);
    clk3 = (p >= 2 && p <= 4);
    clk2 = (p >= 4 || p == 0);
    #10;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    logic d, e, h1, h2;
    int rises0;
    for (int p = 0; p < 6; p++) step(p);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      d = 1'($urandom);
      e = ($urandom % 4) == 0;
      rom_data = d;
      enb = e;
      rises0 = mc_rises;
      step(0); step(1); step(2);
      h1 = rfid_out;                       // read in step 3
      step(3); step(4); step(5);
      h2 = rfid_out;                       // sample taken in step 5
      check(mc_rises - rises0 == 2, "two mc_clk rising edges per period");
      if (e) begin
        check({h1, h2} == 2'b00, $sformatf("disabled: got %b%b", h1, h2));
        n_off++;
      end else if (d) begin
        check({h1, h2} == 2'b01, $sformatf("data 1: got %b%b", h1, h2));
        n_one++;
      end else begin
        check({h1, h2} == 2'b10, $sformatf("data 0: got %b%b", h1, h2));
        n_zero++;
      end
    end
    check(n_zero > 0 && n_one > 0 && n_off > 0, "all three output cases seen");
    $display("symbols: data0=%0d data1=%0d disabled=%0d", n_zero, n_one, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

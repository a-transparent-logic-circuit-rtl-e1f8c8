// tb_rfid_logic_powerup: the tag logic at the 3.6 kHz clock of the
// circuit-level simulation (stage delay 15432 ns), powered up without reset:
// rst_n is tied high, so counter and flip-flops start at random values, as
// on a tag that has no reset pin. After the first counter wrap every
// following frame must be exact: 16 Manchester symbols of the code, then 16
// silent periods. Also checks the clock frequency, 3.6 kHz within 1%.
`timescale 1ns / 1ps
module tb_rfid_logic_powerup;
  localparam string CODE_TEXT = "1100011001101100";
  localparam int FRAMES = 2;

  int checks = 0, failures = 0;
  int n_frames = 0;
  logic rfid_out, clk1, clk2, clk3, rom_out, rom_data, enb, mc_data, mc_clk;
  logic [4:0] add;
  logic [3:0] wl, bl;

  rfid_logic #(.STAGE_DELAY_NS(15432)) dut (
    .rst_n(1'b1), .rfid_out(rfid_out), .clk1(clk1), .clk2(clk2), .clk3(clk3),
    .add(add), .wl(wl), .bl(bl), .rom_out(rom_out), .rom_data(rom_data),
    .enb(enb), .mc_data(mc_data), .mc_clk(mc_clk));

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
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
    realtime t0;
    real freq_hz;
    logic h1, h2;
    string symbols, expected;

    @(posedge clk1); t0 = $realtime;
    @(posedge clk1);
    freq_hz = 1.0e9 / ($realtime - t0);
    check(freq_hz > 3564.0 && freq_hz < 3636.0, $sformatf("CLK#1 frequency %f Hz", freq_hz));

    // wait for the counter to reach address 0
    do begin @(negedge clk1); #1; end while (add != 5'd0);

    expected = "";
    for (int a = 0; a < 32; a++)
      expected = {expected, a >= 16 ? "00" : (CODE_TEXT[a] == "1" ? "01" : "10")};

    for (int f = 0; f < FRAMES; f++) begin
      symbols = "";
      for (int a = 0; a < 32; a++) begin
        @(negedge clk1); #1; h1 = rfid_out;
        @(posedge clk1); #1; h2 = rfid_out;
        symbols = {symbols, h1 ? "1" : "0", h2 ? "1" : "0"};
      end
      check(symbols == expected, {"frame ", symbols});
      if (symbols == expected) n_frames++;
    end
    check(n_frames == FRAMES, "every frame after power-up exact");
    $display("frequency %0.1f Hz, exact frames %0d", freq_hz, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

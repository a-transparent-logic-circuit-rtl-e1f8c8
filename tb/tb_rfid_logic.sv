// tb_rfid_logic: end-to-end test of the tag logic at its default parameters
// (the 3.2 kHz ring oscillator and the code 1100,0110,0110,1100).
//
// Reset is released just after a CLK#1 falling edge. From then on every
// CLK#1 period carries one output symbol: its first half is read at the
// CLK#1 falling edge and its second half at the next rising edge. Symbol j
// belongs to address j mod 32; addresses 0..15 must give the Manchester code
// of the code text (0 -> "10", 1 -> "01"), addresses 16..31 must give "00".
// A reader-side decoder turns each enabled run of 16 symbols back into bits
// and compares them with the code. Also checked: the CLK#1 frequency
// (3.2 kHz within 1%), the 120/240-degree lags of CLK#3/CLK#2, the word and
// bit lines against the address, and that each frame is 32 CLK#1 periods
// long with 16 data symbols. Each mechanism (data-0 symbol, data-1 symbol,
// disabled symbol, counter wrap, frame decoded) is counted and must occur.
`timescale 1ns / 1ps
module tb_rfid_logic;
  localparam string CODE_TEXT = "1100011001101100";  // sent first to last
  localparam int FRAMES = 3;

  int checks = 0, failures = 0;
  int n_sym0 = 0, n_sym1 = 0, n_off = 0, n_wrap = 0, n_frames = 0;

  logic rst_n = 1'b0;
  logic rfid_out, clk1, clk2, clk3, rom_out, rom_data, enb, mc_data, mc_clk;
  logic [4:0] add;
  logic [3:0] wl, bl;

  rfid_logic dut (.rst_n(rst_n), .rfid_out(rfid_out), .clk1(clk1), .clk2(clk2),
                  .clk3(clk3), .add(add), .wl(wl), .bl(bl), .rom_out(rom_out),
                  .rom_data(rom_data), .enb(enb), .mc_data(mc_data),
                  .mc_clk(mc_clk));

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

  // counter wraps, seen on the address port
  logic [4:0] add_prev;
  always @(add) begin
    if (rst_n && add_prev == 5'd31 && add == 5'd0) n_wrap++;
    add_prev = add;
  end

  initial begin
    realtime t0, t1, t2, t3, period;
    logic h1, h2;
    int a;
    string decoded;

    // clock measurements before reset is released
    @(posedge clk1); t0 = $realtime;
    fork
      begin @(posedge clk3); t3 = $realtime; end
      begin @(posedge clk2); t2 = $realtime; end
      begin @(posedge clk1); t1 = $realtime; end
    join
    period = t1 - t0;
    check(1.0e9 / period > 3168.0 && 1.0e9 / period < 3232.0,
          $sformatf("CLK#1 frequency %f Hz", 1.0e9 / period));
    check((t3 - t0) * 3.0 == period, "CLK#3 lags CLK#1 by 120 degrees");
    check((t2 - t0) * 3.0 == 2.0 * period, "CLK#2 lags CLK#1 by 240 degrees");

    @(negedge clk1);
    #1;
    rst_n = 1'b1;
    decoded = "";
    for (int j = 0; j < 32 * FRAMES; j++) begin
      a = j % 32;
      @(negedge clk1); #1; h1 = rfid_out;
      check(int'(add) == (a + 1) % 32, $sformatf("address %0d after symbol %0d", add, j));
      check(wl == (4'b0001 << (add[1:0])) && bl == (4'b0001 << (add[3:2])),
            "word and bit line follow the address");
      @(posedge clk1); #1; h2 = rfid_out;
      if (a < 16) begin
        if (CODE_TEXT[a] == "1") begin
          check({h1, h2} == 2'b01, $sformatf("symbol %0d: data 1 sent as %b%b", j, h1, h2));
          n_sym1++;
        end else begin
          check({h1, h2} == 2'b10, $sformatf("symbol %0d: data 0 sent as %b%b", j, h1, h2));
          n_sym0++;
        end
        // reader side: a falling mid-symbol transition is 1, rising is 0
        if ({h1, h2} == 2'b01)      decoded = {decoded, "1"};
        else if ({h1, h2} == 2'b10) decoded = {decoded, "0"};
        else                        decoded = {decoded, "?"};
      end else begin
        check({h1, h2} == 2'b00, $sformatf("symbol %0d: disabled sent as %b%b", j, h1, h2));
        n_off++;
      end
      if (a == 31) begin
        check(decoded == CODE_TEXT, {"frame decoded as ", decoded});
        if (decoded == CODE_TEXT) n_frames++;
        decoded = "";
      end
    end

    check(n_sym0 == 8 * FRAMES && n_sym1 == 8 * FRAMES, "8 zeros and 8 ones per frame");
    check(n_off == 16 * FRAMES, "16 silent periods per frame");
    check(n_wrap == FRAMES, $sformatf("one counter wrap per frame, saw %0d", n_wrap));
    check(n_frames == FRAMES, "every frame decoded");
    $display("mechanisms: data0=%0d data1=%0d disabled=%0d wraps=%0d frames=%0d",
             n_sym0, n_sym1, n_off, n_wrap, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

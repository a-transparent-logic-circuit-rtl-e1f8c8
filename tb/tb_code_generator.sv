// tb_code_generator: runs the counter, decoders, ROM and ROM data register
// for three 32-address frames. A model address counts CLK#1 falling edges
// after reset. Checked after each falling edge: word and bit lines match the
// model address, the ROM node gives the code bit, enb is the address MSB.
// Checked after each rising edge: rom_data holds the bit of the current
// address. The rom_data bits seen while enb = 0 are collected per frame and
// compared with the code text.
`timescale 1ns / 1ps
module tb_code_generator;
  localparam string CODE_TEXT = "1100011001101100";  // sent first to last

  int checks = 0, failures = 0;
  logic clk1 = 1'b1, rst_n = 1'b0;
  logic [4:0] add;
  logic [3:0] wl, bl;
  logic rom_out, rom_data, enb;
  int addr_model;
  string frame_bits;

  code_generator dut (.clk1(clk1), .rst_n(rst_n), .add(add), .wl(wl), .bl(bl),
                      .rom_out(rom_out), .rom_data(rom_data), .enb(enb));

  always #50 clk1 = ~clk1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s (model address %0d)", $time, what, addr_model);
    end
  endtask

  function automatic logic bit_at(input int a);
    return CODE_TEXT[a % 16] == "1";
  endfunction

  initial begin
    @(negedge clk1);
    @(negedge clk1);
    #1;
    rst_n = 1'b1;
    addr_model = 0;
    frame_bits = "";
    for (int n = 0; n < 96; n++) begin
      @(posedge clk1);
      #1;
      check(rom_data == bit_at(addr_model), "rom_data after rising edge");
      if (addr_model < 16) frame_bits = {frame_bits, rom_data ? "1" : "0"};
      @(negedge clk1);
      addr_model = (addr_model + 1) % 32;
      #1;
      check(int'(add) == addr_model, "counter value");
      check(wl == (4'b0001 << (addr_model % 4)), "word line");
      check(bl == (4'b0001 << ((addr_model / 4) % 4)), "bit line");
      check(rom_out == bit_at(addr_model), "ROM output node");
      check(enb == (addr_model >= 16), "enable-bar");
      if (addr_model == 0) begin
        check(frame_bits == CODE_TEXT, {"frame read as ", frame_bits});
        frame_bits = "";
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

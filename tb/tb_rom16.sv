// tb_rom16: reads every cell of the ROM with one word line and one bit line
// raised and compares with the code written as text, sent in order from
// address 0. Address a selects word line a%4 and bit line a/4. A second ROM
// with a random code checks that the code parameter places the cells; with
// no line selected both outputs must be 1 (nothing pulls the node down).
`timescale 1ns / 1ps
module tb_rom16;
  localparam string CODE_TEXT = "1100011001101100";  // address 0 first
  localparam logic [15:0] ALT_CODE = 16'h5A3C;

  int checks = 0, failures = 0;
  logic [3:0] wl, bl;
  logic rom_out, alt_out;

  rom16 dut (.wl(wl), .bl(bl), .rom_out(rom_out));
  rom16 #(.CODE(ALT_CODE)) dut_alt (.wl(wl), .bl(bl), .rom_out(alt_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int a = 0; a < 16; a++) begin
      wl = 4'b0001 << (a % 4);
      bl = 4'b0001 << (a / 4);
      #1;
      e = (CODE_TEXT[a] == "1");
      checks++;
      if (rom_out !== e) begin
        failures++;
        $display("FAIL address %0d: rom_out=%b expected %b", a, rom_out, e);
      end
      checks++;
      if (alt_out !== ALT_CODE[15-a]) begin
        failures++;
        $display("FAIL alt address %0d: rom_out=%b expected %b", a, alt_out, ALT_CODE[15-a]);
      end
    end
    wl = 4'b0000;
    bl = 4'b1111;
    #1;
    checks++;
    if (rom_out !== 1'b1 || alt_out !== 1'b1) begin
      failures++;
      $display("FAIL no word line selected: outputs %b %b", rom_out, alt_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// code_generator: 16-bit code generation circuit of the tag.
//
// A 5-bit counter steps the address once per CLK#1 period. Its two low bits
// ADD<2:1> go to one 2-to-4 decoder that raises a word line WL<1:4>; ADD<4:3>
// go to a second decoder that raises a bit line BL<1:4>. The selected cell of
// the 16-bit mask ROM sets the ROM output, and a D flip-flop clocked by CLK#1
// turns that slow, glitchy node into the clean ROM data signal for the
// Manchester encoder. ADD<5> leaves as enb, the encoder's enable-bar.
//
// Timing (clk1 = CLK#1): the address changes on the falling edge, the ROM
// data register samples on the rising edge. After a rising edge rom_data is
// the bit of the address held since the preceding falling edge, so rom_data
// carries CODE[15], CODE[14], ... CODE[0] in successive CLK#1 periods while
// enb is 0, and the same 16 bits again (ignored by the encoder) while enb
// is 1. enb changes at the falling edge, in the middle of a rom_data period.
// The structure follows the tag; the edge assignment and the reset are this
// design's own choices.
`timescale 1ns / 1ps
module code_generator #(
  parameter logic [rfid_pkg::CODE_BITS-1:0] CODE = rfid_pkg::ROM_CODE
) (
  input  logic                          clk1,
  input  logic                          rst_n,
  output logic [rfid_pkg::ADDR_BITS-1:0] add,      // ADD<5:1>, add[0] = ADD<1>
  output logic [rfid_pkg::ROWS-1:0]      wl,       // WL<1:4>, wl[0] = WL<1>
  output logic [rfid_pkg::COLS-1:0]      bl,       // BL<1:4>, bl[0] = BL<1>
  output logic                          rom_out,  // unregistered ROM output node
  output logic                          rom_data, // ROM output registered on CLK#1
  output logic                          enb       // ADD<5>: encoder enable-bar
);

  logic rom_data_n;

  counter5 u_counter (
    .clk   (clk1),
    .rst_n (rst_n),
    .add   (add)
  );

  decoder2to4 u_wl_dec (
    .sel (add[1:0]),
    .y   (wl)
  );

  decoder2to4 u_bl_dec (
    .sel (add[3:2]),
    .y   (bl)
  );

  rom16 #(.CODE(CODE)) u_rom (
    .wl      (wl),
    .bl      (bl),
    .rom_out (rom_out)
  );

  dff u_rom_dff (
    .clk   (clk1),
    .rst_n (rst_n),
    .d     (rom_out),
    .q     (rom_data),
    .qn    (rom_data_n)
  );

  assign enb = add[rfid_pkg::ADDR_BITS-1];

endmodule

// rfid_pkg: constants shared by the RFID tag logic.
//
// The tag sends a 16-bit identifier read from a mask ROM. The ROM is a 4x4
// array: a 2-bit word-line address (ADD<2:1>) picks the row and a 2-bit
// bit-line address (ADD<4:3>) picks the column, so the 4-bit address
// ADD<4:1> walks the 16 bits in order. A fifth counter bit (ADD<5>) gates the
// output, so one frame is 16 bit periods of data followed by 16 bit periods
// of silence.
//
// ROM_CODE is written in transmission order: ROM_CODE[15] is sent first
// (address 0) and ROM_CODE[0] last (address 15). The default is the code
// "1100,0110,0110,1100" of the fabricated tag.
`timescale 1ns / 1ps
package rfid_pkg;

  localparam int unsigned CODE_BITS = 16;  // data length, bits
  localparam int unsigned ADDR_BITS = 5;   // counter width; MSB is the enable-bar
  localparam int unsigned ROWS      = 4;   // word lines WL<1:4>
  localparam int unsigned COLS      = 4;   // bit lines  BL<1:4>

  localparam logic [CODE_BITS-1:0] ROM_CODE = 16'b1100_0110_0110_1100;

  // Bit of `code` sent at ROM address `addr` (0..15).
  function automatic logic code_bit(input logic [CODE_BITS-1:0] code,
                                    input logic [3:0] addr);
    return code[CODE_BITS-1-int'(addr)];
  endfunction

endpackage

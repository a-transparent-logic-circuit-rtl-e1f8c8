// rom16: 16-bit mask ROM (4 word lines x 4 bit lines).
//
// Each cell position either holds an NMOS pull-down (stored 0) or nothing
// (stored 1). The selected bit line connects its column to the output node,
// which a diode-connected load pulls high; if the selected word line turns
// on a pull-down in that column the node is pulled low. The logic is a
// wired NOR:
//     rom_out = ~| (wl[r] & bl[c] & cell_pd[r][c])   over all r, c
// With no line selected, or an empty cell selected, the output is 1.
//
// wl and bl are one-hot; index 0 is WL<1> / BL<1>. The cell at word line r
// and bit line c holds the bit sent at address 4*c + r, i.e.
// CODE[15 - (4*c + r)] (see rfid_pkg). Changing CODE moves the pull-downs,
// which is how the code of the tag is programmed. Purely combinational.
`timescale 1ns / 1ps
module rom16 #(
  parameter logic [rfid_pkg::CODE_BITS-1:0] CODE = rfid_pkg::ROM_CODE
) (
  input  logic [rfid_pkg::ROWS-1:0] wl,
  input  logic [rfid_pkg::COLS-1:0] bl,
  output logic                      rom_out
);
  import rfid_pkg::*;

  // cell_pd[r][c] = 1 where a transistor is placed (stored data 0)
  logic [ROWS-1:0][COLS-1:0] cell_pd;

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        cell_pd[r][c] = ~code_bit(CODE, 4'(COLS*c + r));
  end

  always_comb begin
    rom_out = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (wl[r] && bl[c] && cell_pd[r][c]) rom_out = 1'b0;
  end

endmodule

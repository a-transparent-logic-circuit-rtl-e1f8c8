// decoder2to4: 2-to-4 one-hot line decoder.
//
// Drives exactly one of the four outputs high: y[sel] = 1. Output index 0
// is line <1> of the ROM (WL<1> or BL<1>), so address 0 selects line <1>
// and address 3 selects line <4>. The tag uses one decoder for the word
// lines (from ADD<2:1>) and one for the bit lines (from ADD<4:3>).
// Purely combinational. Active-high outputs and the 0 -> <1> numbering are
// this design's reading; the line order follows the ROM layout of the tag.
`timescale 1ns / 1ps
module decoder2to4 (
  input  logic [1:0] sel,
  output logic [3:0] y
);

  always_comb begin
    y = '0;
    y[sel] = 1'b1;
  end

endmodule

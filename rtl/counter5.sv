// counter5: 5-bit address counter of the tag.
//
// Counts up by one per CLK#1 period and wraps from 31 to 0. add[3:0] is the
// ROM address ADD<4:1>; add[4] is ADD<5>, used as the Manchester encoder's
// enable-bar, so the encoder is enabled for addresses 0..15 and silent for
// 16..31.
//
// Timing: the counter advances on the falling edge of clk (CLK#1), half a
// period before the ROM data register samples on the rising edge. The ROM
// output therefore settles for half a clock period and the register always
// captures the bit of the current address, which sends the code in address
// order. The edge choice and the asynchronous active-low reset rst_n (to
// address 0) are this design's own; the counter's circuit is not given.
`timescale 1ns / 1ps
module counter5 #(
  parameter int unsigned WIDTH = rfid_pkg::ADDR_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] add
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) add <= '0;
    else        add <= add + 1'b1;
  end

endmodule

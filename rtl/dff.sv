// dff: data flip-flop of the tag logic.
//
// The fabricated cell is a static six-gate NAND flip-flop (cross-coupled
// NAND-2/NAND-3 latches) with true and complement outputs. Here it is the
// equivalent edge-triggered register: q takes d on the rising edge of clk,
// qn is always the complement of q. The tag uses two of them: one registers
// the ROM output on CLK#1, the other retimes the Manchester stream on MC_CLK.
//
// The rising-edge choice and the asynchronous active-low reset rst_n are
// this design's own: the cell as drawn has no reset, and the clock edge it
// responds to is not stated. The reset exists so that simulation starts from
// a known state; tie it high to get the reset-free cell.
`timescale 1ns / 1ps
module dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qn
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  assign qn = ~q;

endmodule

// xor_en: exclusive-OR with an active-low enable (enable-bar) pin.
//
// out = in1 ^ in2 while enb = 0, and out = 0 while enb = 1.
//
// The gate is built the way the pseudo-CMOS cell is: a NOR-2 of the two
// inputs feeds an AOI-211 (AND-OR-INVERT with a two-input AND term and two
// single terms). The AOI's AND term is in1 & in2, its single terms are the
// NOR-2 output and enb:
//     out = ~((in1 & in2) | ~(in1 | in2) | enb)
// The first two terms are high exactly when the inputs are equal, so the
// gate is an XOR forced low by enb. Purely combinational.
`timescale 1ns / 1ps
module xor_en (
  input  logic in1,
  input  logic in2,
  input  logic enb,
  output logic out
);

  logic nor2;

  always_comb begin
    nor2 = ~(in1 | in2);
    out  = ~((in1 & in2) | nor2 | enb);
  end

endmodule

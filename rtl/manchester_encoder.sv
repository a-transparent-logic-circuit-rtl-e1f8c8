// manchester_encoder: turns the ROM data into the tag's modulation signal.
//
// Encoding: while enb = 0 a data bit 0 is sent as "10" and a 1 as "01"
// (first half, second half of one CLK#1 period); while enb = 1 the output
// is "00", which keeps the tag's modulation transistor off.
//
// How it works: the first gate is an XOR with enable-bar,
//     mc_data = (rom_data ^ clk1) & ~enb,
// so in the half period where CLK#1 is high mc_data is ~rom_data and in the
// low half it is rom_data. The second XOR combines the two other phases,
//     mc_clk = clk2 ^ clk3,
// a clock at twice the CLK#1 rate. With CLK#3 lagging CLK#1 by 120 degrees
// and CLK#2 lagging by 240 degrees, mc_clk rises 120 and 300 degrees into
// every CLK#1 period, once inside each half and away from the edges of
// mc_data. A flip-flop samples mc_data on those rising edges, so rfid_out
// is the Manchester stream retimed: each half bit appears 120 degrees after
// the start of that half and is free of the XOR glitches.
//
// rom_data must change only at the rising edge of clk1. The gate structure
// is the tag's; the sampling edge of the flip-flop and the reset are this
// design's own choices.
`timescale 1ns / 1ps
module manchester_encoder (
  input  logic clk1,
  input  logic clk2,
  input  logic clk3,
  input  logic rst_n,
  input  logic rom_data,
  input  logic enb,
  output logic mc_data,
  output logic mc_clk,
  output logic rfid_out
);

  logic rfid_out_n;

  xor_en u_data_xor (
    .in1 (rom_data),
    .in2 (clk1),
    .enb (enb),
    .out (mc_data)
  );

  xor_en u_clk_xor (
    .in1 (clk2),
    .in2 (clk3),
    .enb (1'b0),
    .out (mc_clk)
  );

  dff u_out_dff (
    .clk   (mc_clk),
    .rst_n (rst_n),
    .d     (mc_data),
    .q     (rfid_out),
    .qn    (rfid_out_n)
  );

endmodule

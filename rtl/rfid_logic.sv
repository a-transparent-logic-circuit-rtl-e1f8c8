// rfid_logic: digital logic of a passive RFID tag that sends a 16-bit code.
//
// Blocks: a three-phase ring-oscillator clock generator (CLK#1..#3, 120
// degrees apart); the 16-bit code generation circuit (5-bit counter, word-
// and bit-line decoders, mask ROM, ROM data flip-flop) clocked by CLK#1; and
// the Manchester encoder, enabled by counter bit ADD<5>. rfid_out drives the
// gate of the tag's modulation transistor: one frame is 16 Manchester
// symbols (0 -> "10", 1 -> "01", one symbol per CLK#1 period) followed by
// 16 periods of constant 0, repeated for as long as the tag is powered.
//
// At the default 3.2 kHz clock a frame lasts 32 x 312.5 us = 10 ms and the
// data rate is 3.2 kbit/s while enabled.
//
// The clock generator is a delay-based behavioural model, so this top is a
// simulation model as a whole; code_generator and manchester_encoder are
// synthesizable and take the three clocks as inputs. rst_n (asynchronous,
// active low) is this design's addition; release it just after a falling
// edge of clk1 for a frame that starts cleanly with address 0. The other
// outputs expose the internal signals that the tag's simulated waveforms
// show.
`timescale 1ns / 1ps
module rfid_logic #(
  parameter logic [rfid_pkg::CODE_BITS-1:0] CODE = rfid_pkg::ROM_CODE,
  parameter int unsigned STAGE_DELAY_NS = 17361
) (
  input  logic                           rst_n,
  output logic                           rfid_out,
  output logic                           clk1,
  output logic                           clk2,
  output logic                           clk3,
  output logic [rfid_pkg::ADDR_BITS-1:0] add,
  output logic [rfid_pkg::ROWS-1:0]      wl,
  output logic [rfid_pkg::COLS-1:0]      bl,
  output logic                           rom_out,
  output logic                           rom_data,
  output logic                           enb,
  output logic                           mc_data,
  output logic                           mc_clk
);

  clock_generator #(.STAGE_DELAY_NS(STAGE_DELAY_NS)) u_clkgen (
    .clk1 (clk1),
    .clk2 (clk2),
    .clk3 (clk3)
  );

  code_generator #(.CODE(CODE)) u_codegen (
    .clk1     (clk1),
    .rst_n    (rst_n),
    .add      (add),
    .wl       (wl),
    .bl       (bl),
    .rom_out  (rom_out),
    .rom_data (rom_data),
    .enb      (enb)
  );

  manchester_encoder u_enc (
    .clk1     (clk1),
    .clk2     (clk2),
    .clk3     (clk3),
    .rst_n    (rst_n),
    .rom_data (rom_data),
    .enb      (enb),
    .mc_data  (mc_data),
    .mc_clk   (mc_clk),
    .rfid_out (rfid_out)
  );

endmodule

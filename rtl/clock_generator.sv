// clock_generator: behavioural model of the tag's three-phase ring oscillator.
// It uses delays and is for simulation only; it is not synthesizable logic.
//
// The circuit is a ring of nine inverters made of three identical delay
// circuits of three inverters each; every inverter output carries an NMOS
// load capacitor that sets the frequency. The output of each delay circuit
// is buffered by one more inverter to give CLK#1, CLK#2 and CLK#3.
//
// Model: node[k] is the output of inverter k+1 (node[8] feeds inverter 1).
// Every STAGE_DELAY_NS all inverters take the complement of their input at
// once. The ring starts with a single transition travelling round it, so
// each node is a square wave of period 2 * 9 * STAGE_DELAY_NS with 50% duty.
// The taps sit three inverters apart, which is a third of a period apart in
// time after accounting for the odd inversion count: CLK#3 lags CLK#1 by
// 120 degrees and CLK#2 lags CLK#1 by 240 degrees.
//
// The default STAGE_DELAY_NS of 17361 ns gives a 312.5 us period, the
// 3.2 kHz measured on the fabricated tag at VDD = 6 V. In silicon the stage
// delay depends on supply voltage and process; here it is a fixed number.
// The oscillator runs from time 0; it has no enable, as the tag has none.
// A synthesis tool that ignores the delays sees the nine inverters as a
// combinational loop and reports it: that loop is the oscillator itself.
`timescale 1ns / 1ps
module clock_generator #(
  parameter int unsigned INV_PER_DELAY  = 3,      // inverters per delay circuit
  parameter int unsigned STAGE_DELAY_NS = 17361   // delay of one loaded inverter
) (
  output logic clk1,
  output logic clk2,
  output logic clk3
);

  localparam int unsigned RING = 3 * INV_PER_DELAY;  // nine inverters

  logic [RING-1:0] node;

  // power-up state, alternating levels: every inverter is settled except
  // inverter 1, so a single transition travels round the ring
  initial begin
    for (int k = 0; k < RING; k++) node[k] = k[0];
  end

  always begin
    #(STAGE_DELAY_NS * 1ns);
    node = ~{node[RING-2:0], node[RING-1]};
  end

  // output buffers on the three delay-circuit outputs
  assign clk1 = ~node[INV_PER_DELAY-1];
  assign clk2 = ~node[2*INV_PER_DELAY-1];
  assign clk3 = ~node[RING-1];

endmodule

// tb_counter5: the counter must start at 0 after reset, step by one on
// every falling clock edge, stay put on rising edges and wrap from 31 to 0.
`timescale 1ns / 1ps
module tb_counter5;
  int checks = 0, failures = 0;
  int wraps = 0;
  logic clk = 1'b1, rst_n = 1'b0;
  logic [4:0] add;
  int expected;

  counter5 dut (.clk(clk), .rst_n(rst_n), .add(add));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_add(input int e, input string where);
    checks++;
    if (int'(add) != e) begin
      failures++;
      $display("FAIL %s: add=%0d expected %0d", where, add, e);
    end
  endtask

  initial begin
    #6;
    expect_add(0, "in reset");
    rst_n = 1'b1;             // released just after a falling edge
    expected = 0;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk);
      #1;
      expect_add(expected, "after rising edge");
      @(negedge clk);
      expected = (expected + 1) % 32;
      if (expected == 0) wraps++;
      #1;
      expect_add(expected, "after falling edge");
    end
    checks++;
    if (wraps != 3) begin
      failures++;
      $display("FAIL expected 3 wraps, saw %0d", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

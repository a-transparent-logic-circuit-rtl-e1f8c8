// tb_dff: random data through the flip-flop. q must take d on each rising
// clock edge only, hold through the falling edge, clear on reset, and qn
// must be the complement of q.
`timescale 1ns / 1ps
module tb_dff;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q, qn;
  logic model_q;

  dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .qn(qn));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic e, input string where);
    checks++;
    if (q !== e || qn !== ~e) begin
      failures++;
      $display("FAIL %s: q=%b qn=%b expected q=%b", where, q, qn, e);
    end
  endtask

  initial begin
    #12;
    expect_q(1'b0, "in reset");
    rst_n = 1'b1;
    model_q = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      expect_q(model_q, "after falling edge");   // falling edge must not load
      d = 1'($urandom);
      #2;
      expect_q(model_q, "d changed, no edge");
      @(posedge clk);
      model_q = d;
      #1;
      expect_q(model_q, "after rising edge");
    end
    d = 1'b1;
    @(posedge clk);
    #1;
    rst_n = 1'b0;
    #1;
    expect_q(1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

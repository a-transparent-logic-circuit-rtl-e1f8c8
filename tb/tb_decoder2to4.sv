// tb_decoder2to4: every select value must raise exactly its own line.
`timescale 1ns / 1ps
module tb_decoder2to4;
  int checks = 0, failures = 0;
  logic [1:0] sel;
  logic [3:0] y;

  decoder2to4 dut (.sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (y !== (4'b0001 << s)) begin
          failures++;
          $display("FAIL sel=%0d y=%b", s, y);
        end
        checks++;
        if (!$onehot(y)) begin
          failures++;
          $display("FAIL sel=%0d y=%b not one-hot", s, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

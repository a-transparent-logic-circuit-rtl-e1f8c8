// tb_xor_en: exhaustive truth-table test of the XOR gate with enable-bar.
// Expected values: in1 != in2 with enb low gives 1, everything else 0.
`timescale 1ns / 1ps
module tb_xor_en;
  int checks = 0, failures = 0;
  logic in1, in2, enb, out;

  xor_en dut (.in1(in1), .in2(in2), .enb(enb), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_out;
    for (int rep = 0; rep < 2; rep++)
      for (int v = 0; v < 8; v++) begin
        {enb, in1, in2} = 3'(v);
        #1;
        exp_out = (enb == 1'b0) && (in1 != in2);
        checks++;
        if (out !== exp_out) begin
          failures++;
          $display("FAIL enb=%b in1=%b in2=%b out=%b expected %b", enb, in1, in2, out, exp_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

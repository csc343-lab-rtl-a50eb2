// tb_decoder: applies all four register numbers to the 2:4 decoder and checks
// that exactly the matching output line is high.
`timescale 1ns/1ps
module tb_decoder;
  logic [1:0] i;
  logic [3:0] o;
  int checks = 0, failures = 0;

  decoder #(.IN_W(2)) dut (.i(i), .o(o));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      i = 2'(k);
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (o[b] !== (b == k)) begin
          failures++;
          $display("i=%0d: o=%b", k, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

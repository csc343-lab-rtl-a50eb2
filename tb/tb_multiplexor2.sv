// tb_multiplexor2: random words on both inputs and both select values; the
// output must equal the selected input.
`timescale 1ns/1ps
module tb_multiplexor2;
  logic [3:0] i0, i1, o;
  logic       s;
  int checks = 0, failures = 0;

  multiplexor2 #(.WIDTH(4)) dut (.i0(i0), .i1(i1), .s(s), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      i0 = 4'($urandom); i1 = 4'($urandom); s = 1'(n % 2);
      #1;
      checks++;
      if (o !== (s ? i1 : i0)) begin
        failures++;
        $display("s=%b i0=%h i1=%h: o=%h", s, i0, i1, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

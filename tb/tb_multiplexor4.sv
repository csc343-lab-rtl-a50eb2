// tb_multiplexor4: random words on the four inputs, every select value, and a
// check that the output equals the selected input.
`timescale 1ns/1ps
module tb_multiplexor4;
  logic [3:0] i0, i1, i2, i3, o;
  logic [1:0] s;
  logic [3:0] expected;
  int checks = 0, failures = 0;

  multiplexor4 #(.WIDTH(4)) dut (.i0(i0), .i1(i1), .i2(i2), .i3(i3), .s(s), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      i0 = 4'($urandom); i1 = 4'($urandom); i2 = 4'($urandom); i3 = 4'($urandom);
      s  = 2'(n % 4);
      #1;
      if (s == 2'd0)      expected = i0;
      else if (s == 2'd1) expected = i1;
      else if (s == 2'd2) expected = i2;
      else                expected = i3;
      checks++;
      if (o !== expected) begin
        failures++;
        $display("s=%0d inputs %h %h %h %h: o=%h expected %h", s, i0, i1, i2, i3, o, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

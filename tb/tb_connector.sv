// tb_connector: checks all sixteen values of the 7-segment converter. The
// expected code is built from the list of lit segments of each character
// (segment a is bit 6, g is bit 0, a lit segment reads 0).
`timescale 1ns/1ps
module tb_connector;
  logic [3:0] bin;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  connector dut (.bin(bin), .seg(seg));

  // lit segments of 0..F
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                      "abc", "abcdefg", "abcfg", "abcefg", "cdefg", "adef",
                      "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] code_of(string s);
    logic [6:0] c = 7'b1111111;
    for (int k = 0; k < s.len(); k++) c[6 - (s[k] - "a")] = 1'b0;
    return c;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bin = 4'(v);
      #1;
      checks++;
      if (seg !== code_of(lit[v])) begin
        failures++;
        $display("value %h: seg=%b expected %b", v, seg, code_of(lit[v]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

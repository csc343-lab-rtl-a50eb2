// connector: converts a 4-bit binary value into the code of a 7-segment LED
// display. The code is {a,b,c,d,e,f,g} from bit 6 down to bit 0 and is active
// low: a 0 lights the segment. Purely combinational.
//
// The digits follow the usual segment table (0 = 0000001, 1 = 1001111,
// 8 = 0000000, A = 0001000, F = 0111000, ...); the 9 leaves segment d dark,
// and the letters B and D are shown lower case (b, d) as usual on such
// displays.
//
// The codes are the lab's segment table, except C: the table there repeats the
// code of E for C, which would make the two letters look alike, so C uses
// 0110001 (segments a, d, e, f).
module connector
  import regfile_pkg::*;
(
  input  data_t bin,
  output seg7_t seg
);
  always_comb begin
    unique case (bin)
      4'h0: seg = 7'b0000001;
      4'h1: seg = 7'b1001111;
      4'h2: seg = 7'b0010010;
      4'h3: seg = 7'b0000110;
      4'h4: seg = 7'b1001100;
      4'h5: seg = 7'b0100100;
      4'h6: seg = 7'b0100000;
      4'h7: seg = 7'b0001111;
      4'h8: seg = 7'b0000000;
      4'h9: seg = 7'b0001100;
      4'hA: seg = 7'b0001000;
      4'hB: seg = 7'b1100000;
      4'hC: seg = 7'b0110001;
      4'hD: seg = 7'b1000010;
      4'hE: seg = 7'b0110000;
      default: seg = 7'b0111000;  // F
    endcase
  end
endmodule

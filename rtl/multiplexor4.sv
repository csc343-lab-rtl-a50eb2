// multiplexor4: WIDTH-bit 4:1 multiplexor, o = i0/i1/i2/i3 for s = 00/01/10/11.
// Purely combinational. Used for both read ports of the register file and for
// choosing the data word on the write side. Inputs I0..I3 and select S are the
// lab circuit's; only the width parameter is added.
module multiplexor4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] i0,
  input  logic [WIDTH-1:0] i1,
  input  logic [WIDTH-1:0] i2,
  input  logic [WIDTH-1:0] i3,
  input  logic [1:0]       s,
  output logic [WIDTH-1:0] o
);
  always_comb begin
    unique case (s)
      2'b00: o = i0;
      2'b01: o = i1;
      2'b10: o = i2;
      default: o = i3;
    endcase
  end
endmodule

// multiplexor2: WIDTH-bit 2:1 multiplexor, o = i0 when s = 0, i1 when s = 1.
// Purely combinational; in the board design it picks PortA (s = 0) or PortB
// (s = 1) for the single LCD. Which select value picks which port is this
// design's choice.
module multiplexor2 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] i0,
  input  logic [WIDTH-1:0] i1,
  input  logic             s,
  output logic [WIDTH-1:0] o
);
  assign o = s ? i1 : i0;
endmodule

// dff: one storage cell of the register file, a positive-edge D flip-flop.
// q takes d on a rising edge of clk when en is 1 and holds otherwise. In the
// original gate-level scheme each cell is clocked by (write clock AND decoder
// output); here that AND product is applied as a clock enable on the common
// clock, which writes the same cell on the same edge but keeps a single,
// glitch-free clock net. There is no reset: the cell, like the original, holds
// an undefined value until it is first written.
module dff (
  input  logic clk,
  input  logic en,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (en) q <= d;
  end
endmodule

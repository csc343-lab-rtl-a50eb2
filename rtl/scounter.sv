// scounter: counts button presses modulo 2**WIDTH (a modulo-4 counter by
// default) and puts the count on the address bus: 00, 01, 10, 11, 00, ...
// The count advances on a rising clk edge when inc is 1 (inc is the one-clock
// press pulse from the debouncer). rst_n is asynchronous, active low, and
// clears the count to 00.
//
// A modulo-4 press counter driving the address bus is the lab circuit's; the
// start value 00 is chosen so that the first press selects register 01, and
// the reset and the count enable are this design's.
module scounter #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (inc) count <= count + 1'b1;
  end
endmodule

// registerfile: four registers of DATA_W bits (4 x 4 by default) with one
// write port and two independent read ports.
//
// Structure: a 2:4 decoder turns the write register number into four select
// lines; each select line is ANDed with the write strobe and enables the DATA_W
// dff cells of one register, all of which take din. Every register output
// feeds both 4:1 multiplexors; rd_num1 steers one of them onto port A and
// rd_num2 the other onto port B, so two registers are read at once.
//
// Timing: the write happens on the rising edge of clk when we = 1 (we plays the
// part of the write clock "clock4"; tie we to 1 and use clk as the write clock
// to get the original behaviour of one write per clock edge). Reads are
// combinational: a written value appears on a port right after the edge, and a
// change of rd_num1/rd_num2 shows without waiting for a clock. Writing and
// reading the same register in one cycle returns the old value until the edge.
// The registers have no reset.
module registerfile #(
  parameter int unsigned DATA_W = regfile_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              we,       // write strobe (clock4)
  input  logic [1:0]        wr_num,   // register number to write
  input  logic [DATA_W-1:0] din,
  input  logic [1:0]        rd_num1,  // read register number 1 -> port A
  input  logic [1:0]        rd_num2,  // read register number 2 -> port B
  output logic [DATA_W-1:0] dout_a,
  output logic [DATA_W-1:0] dout_b
);
  logic [3:0]        sel;     // decoder outputs
  logic [3:0]        wsel;    // decoder outputs ANDed with the write strobe
  logic [DATA_W-1:0] q [4];   // register contents

  decoder #(.IN_W(2)) u_dec (.i(wr_num), .o(sel));

  assign wsel = sel & {4{we}};

  for (genvar r = 0; r < 4; r++) begin : g_reg
    for (genvar b = 0; b < DATA_W; b++) begin : g_bit
      dff u_cell (.clk(clk), .en(wsel[r]), .d(din[b]), .q(q[r][b]));
    end
  end

  multiplexor4 #(.WIDTH(DATA_W)) u_mux_a (
    .i0(q[0]), .i1(q[1]), .i2(q[2]), .i3(q[3]), .s(rd_num1), .o(dout_a));
  multiplexor4 #(.WIDTH(DATA_W)) u_mux_b (
    .i0(q[0]), .i1(q[1]), .i2(q[2]), .i3(q[3]), .s(rd_num2), .o(dout_b));
endmodule

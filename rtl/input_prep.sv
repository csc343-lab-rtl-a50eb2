// input_prep: write side of the board design. A push-button is debounced; each
// press is one write. The press counter supplies the register number to write,
// and a 4:1 multiplexor steered by the same count picks the data word, so the
// first press writes data_in[0] into register 00, the second data_in[1] into
// register 01, and so on, wrapping after four presses.
//
// Timing: wr_en is high for one clock per press. While it is high, wr_num and
// wr_data still show the count from before the press; the count advances on the
// edge that ends the pulse, the same edge on which the register file writes.
//
// The button -> debounce -> counter -> data multiplexor chain is the lab
// circuit's. Writing with the count from before the press (press 1 loads
// register 00) is this design's reading of it.
module input_prep
  import regfile_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 48_000_000,
  parameter int unsigned DEBOUNCE_US = 10_000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  btn_write,
  input  data_t data_in [4],  // I0..I3 of the data multiplexor
  output logic  wr_en,
  output addr_t wr_num,
  output data_t wr_data
);
  button_counter #(.CLK_HZ(CLK_HZ), .DEBOUNCE_US(DEBOUNCE_US)) u_btn (
    .clk(clk), .rst_n(rst_n), .btn_raw(btn_write), .btn_clean(),
    .press(wr_en), .count(wr_num));

  multiplexor4 #(.WIDTH(DATA_W)) u_mux (
    .i0(data_in[0]), .i1(data_in[1]), .i2(data_in[2]), .i3(data_in[3]),
    .s(wr_num), .o(wr_data));
endmodule

// button_counter: one push-button chain, a debouncer followed by the press
// counter. btn_clean is the filtered button level; press pulses for one clock per accepted press; count is the address
// bus the button steps through (00, 01, 10, 11, ...). count changes on the same
// clock edge that ends the press pulse, so a user of press sees the count from
// before the press while the pulse is high.
module button_counter #(
  parameter int unsigned CLK_HZ      = 48_000_000,
  parameter int unsigned DEBOUNCE_US = 10_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       btn_raw,
  output logic       btn_clean,  // debounced button level
  output logic       press,
  output logic [1:0] count
);
  debounce #(.CLK_HZ(CLK_HZ), .DEBOUNCE_US(DEBOUNCE_US)) u_debounce (
    .clk(clk), .rst_n(rst_n), .btn_raw(btn_raw),
    .btn_clean(btn_clean), .press(press));

  scounter #(.WIDTH(2)) u_scounter (
    .clk(clk), .rst_n(rst_n), .inc(press), .count(count));
endmodule

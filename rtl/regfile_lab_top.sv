// regfile_lab_top: the 4 x 4 register file with push-button input and
// 7-segment / LCD output, as put on an FPGA board.
//
// Write side: every press of btn_write writes one register. A press counter
// supplies the register number (00, 01, 10, 11, then around again) and steers
// a 4:1 multiplexor that picks the data word from data_in[0..3], so four
// presses load data_in[k] into register k.
//
// Read side: btn_read_a and btn_read_b each step their own press counter,
// which drives read register number 1 (port A) or 2 (port B). Both counters
// start at 00, so the first press shows register 01, then 10, 11 and 00.
// Each port is converted to a 7-segment code (seg_a, seg_b); a 2:1 multiplexor
// picks port A (lcd_sel = 0) or port B (lcd_sel = 1) for the LCD controller,
// which shows it as one hexadecimal character.
//
// Timing: everything runs on clk. A press is recognised DEBOUNCE_US after the
// contact has settled; the register is written on the clock edge that ends the
// one-clock press pulse. Port A/B and the segment outputs are combinational
// from the registers and read counters. The LCD follows within one bus write
// sequence (a few hundred microseconds at the default timing) once its power-up
// and initialisation are done. rst_n is asynchronous and active low; it clears
// the press counters and the LCD controller but not the registers.
//
// The blocks and their wiring follow the lab circuit. Running everything on one
// clock with press pulses as clock enables, the LCD port-select input and the
// LCD and debounce timing are this design's choices. The LCD data pins are
// split into lcd_data (out), lcd_data_oe and lcd_data_in; a board wrapper joins
// them in a tri-state pad.
module regfile_lab_top
  import regfile_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 48_000_000,
  parameter int unsigned DEBOUNCE_US  = 10_000,
  parameter int unsigned T_EXEC_US    = 50,
  parameter int unsigned T_CLEAR_US   = 2_000,
  parameter int unsigned T_POWERUP_US = 20_000,
  parameter bit          LCD_BUSY_POLL = 1'b1  // 0: fixed waits, no LCD reads
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       btn_write,    // push-buttons, 1 = pressed, may bounce
  input  logic       btn_read_a,
  input  logic       btn_read_b,
  input  data_t      data_in [4],  // words written by presses 1..4 (I0..I3)
  input  logic       lcd_sel,      // 0: LCD shows port A, 1: port B
  output data_t      port_a,
  output data_t      port_b,
  output addr_t      rd_num_a,     // register shown on port A
  output addr_t      rd_num_b,     // register shown on port B
  output addr_t      wr_num,       // register the next write press loads
  output seg7_t      seg_a,        // 7-segment code of port A, active low
  output seg7_t      seg_b,
  output logic       lcd_e,
  output logic       lcd_rw,
  output logic       lcd_rs,
  output logic [7:0] lcd_data,     // DB0..DB7 driven by the design
  output logic       lcd_data_oe,  // 1: drive DB0..DB7, 0: the LCD drives them
  input  logic [7:0] lcd_data_in,  // DB0..DB7 as seen on the pins
  output logic       lcd_ready     // LCD controller idle, value shown
);
  logic  wr_en;
  data_t wr_data;
  data_t lcd_value;

  input_prep #(.CLK_HZ(CLK_HZ), .DEBOUNCE_US(DEBOUNCE_US)) u_input_prep (
    .clk(clk), .rst_n(rst_n), .btn_write(btn_write), .data_in(data_in),
    .wr_en(wr_en), .wr_num(wr_num), .wr_data(wr_data));

  button_counter #(.CLK_HZ(CLK_HZ), .DEBOUNCE_US(DEBOUNCE_US)) u_read_a (
    .clk(clk), .rst_n(rst_n), .btn_raw(btn_read_a), .btn_clean(),
    .press(), .count(rd_num_a));

  button_counter #(.CLK_HZ(CLK_HZ), .DEBOUNCE_US(DEBOUNCE_US)) u_read_b (
    .clk(clk), .rst_n(rst_n), .btn_raw(btn_read_b), .btn_clean(),
    .press(), .count(rd_num_b));

  registerfile #(.DATA_W(DATA_W)) u_registerfile (
    .clk(clk), .we(wr_en), .wr_num(wr_num), .din(wr_data),
    .rd_num1(rd_num_a), .rd_num2(rd_num_b),
    .dout_a(port_a), .dout_b(port_b));

  connector u_connector_a (.bin(port_a), .seg(seg_a));
  connector u_connector_b (.bin(port_b), .seg(seg_b));

  multiplexor2 #(.WIDTH(DATA_W)) u_lcd_mux (
    .i0(port_a), .i1(port_b), .s(lcd_sel), .o(lcd_value));

  lcd_connector #(
    .CLK_HZ(CLK_HZ), .T_EXEC_US(T_EXEC_US), .T_CLEAR_US(T_CLEAR_US),
    .T_POWERUP_US(T_POWERUP_US), .BUSY_POLL(LCD_BUSY_POLL)
  ) u_lcd (
    .clk(clk), .rst_n(rst_n), .value(lcd_value),
    .lcd_e(lcd_e), .lcd_rw(lcd_rw), .lcd_rs(lcd_rs), .lcd_data(lcd_data),
    .lcd_data_oe(lcd_data_oe), .lcd_data_in(lcd_data_in), .ready(lcd_ready));
endmodule

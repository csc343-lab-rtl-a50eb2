// tb_regfile_lab_top: end-to-end test of the board design at its default
// sizes (48 MHz clock, 10 ms debounce, real LCD power-up and command waits).
//
// The bench plays the user and the display: it presses bouncing buttons,
// decodes the LCD bus (one character, the last byte written with RS = 1) and
// reads the 7-segment outputs. Sequence:
//   1. four presses of the write button load data_in[0..3] = 1, 2, 3, 4 into
//      registers 00..11 (the write counter wraps back to 00);
//   2. four presses of read button A step port A through registers 01, 10, 11,
//      00; after each the port, its 7-segment code and the LCD character are
//      checked (the LCD shows port A);
//   3. the LCD is switched to port B, and four presses of read button B do the
//      same for port B;
//   4. four more write presses load new words, which must appear at once on
//      both ports (both read counters are back at 00 for register 00).
// Each mechanism is counted and must occur: bounces rejected, writes, counter
// wrap, reads on A and B, LCD initialisation, LCD updates and the LCD port
// switch, and LCD busy-flag reads that find the display busy and not busy.
// The bench's display stays busy for 40 us after a write (1.6 ms after a
// clear) and answers busy-flag reads. LCD bus cycles are checked for E pulse
// width (>= 230 ns), cycle time (>= 500 ns), bus direction and no write while
// busy.
`timescale 1ns/1ps
module tb_regfile_lab_top;
  import regfile_pkg::*;

  logic       clk = 1'b0, rst_n;
  logic       btn_write, btn_read_a, btn_read_b, lcd_sel;
  data_t      data_in [4];
  data_t      port_a, port_b;
  addr_t      rd_num_a, rd_num_b, wr_num;
  seg7_t      seg_a, seg_b;
  logic       lcd_e, lcd_rw, lcd_rs, lcd_ready, lcd_data_oe;
  logic [7:0] lcd_data, lcd_data_in = 8'h00;

  regfile_lab_top dut (
    .clk(clk), .rst_n(rst_n),
    .btn_write(btn_write), .btn_read_a(btn_read_a), .btn_read_b(btn_read_b),
    .data_in(data_in), .lcd_sel(lcd_sel),
    .port_a(port_a), .port_b(port_b),
    .rd_num_a(rd_num_a), .rd_num_b(rd_num_b), .wr_num(wr_num),
    .seg_a(seg_a), .seg_b(seg_b),
    .lcd_e(lcd_e), .lcd_rw(lcd_rw), .lcd_rs(lcd_rs), .lcd_data(lcd_data),
    .lcd_data_oe(lcd_data_oe), .lcd_data_in(lcd_data_in), .lcd_ready(lcd_ready));

  // 48 MHz
  always #10.4167 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bounce_rejected = 0, n_writes = 0, n_wr_wrap = 0, n_reads_a = 0, n_reads_b = 0;
  int n_rd_wrap = 0, n_lcd_init = 0, n_lcd_updates = 0, n_lcd_switch = 0;
  int n_busy_reads = 0, n_free_reads = 0;

  initial begin
    #1_000_000_000;  // 1 s of simulated time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // ---- reference 7-segment codes, from the lit segments of each character ----
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                      "abc", "abcdefg", "abcfg", "abcefg", "cdefg", "adef",
                      "bcdeg", "adefg", "aefg"};
  function automatic seg7_t seg_of(input data_t v);
    seg7_t c = 7'b1111111;
    for (int k = 0; k < lit[v].len(); k++) c[6 - (lit[v][k] - "a")] = 1'b0;
    return c;
  endfunction
  function automatic logic [7:0] ascii(input data_t v);
    return (v < 10) ? 8'h30 + 8'(v) : 8'h37 + 8'(v);
  endfunction

  // ---- the LCD as seen by the bench ----
  logic [7:0] lcd_char = 8'h00;
  logic [7:0] lcd_cmds [$];
  realtime    t_rise = -1.0e9;
  // busy for 40 us after a write (1.6 ms after the clear); the busy flag is
  // valid on DB7 from 160 ns after E rises on a read
  realtime    busy_until = 0;
  bit         rd_busy;
  always @(posedge lcd_e) begin
    check($realtime - t_rise >= 500.0, "LCD enable cycle time below 500 ns");
    t_rise = $realtime;
    if (lcd_rw) begin
      check(!lcd_data_oe, "LCD bus driven during a read");
      rd_busy = $realtime < busy_until;
      lcd_data_in = 8'($urandom);
      #160;
      if (lcd_e) lcd_data_in = {rd_busy, 7'h00};
    end else begin
      check(lcd_data_oe, "LCD bus not driven during a write");
      check($realtime >= busy_until, "LCD written while busy");
    end
  end
  always @(negedge lcd_e) begin
    check($realtime - t_rise >= 230.0, "LCD enable pulse narrower than 230 ns");
    if (lcd_rw) begin
      if (rd_busy) n_busy_reads++;
      else         n_free_reads++;
      #5 lcd_data_in = 8'($urandom);
    end else begin
      if (lcd_rs) lcd_char = lcd_data;
      else        lcd_cmds.push_back(lcd_data);
      busy_until = $realtime + ((!lcd_rs && lcd_data == 8'h01) ? 1_600_000.0 : 40_000.0);
    end
  end

  // ---- the user ----
  localparam realtime MS = 1_000_000.0;

  // a press: the contact bounces for about 1 ms on closing and on opening
  task automatic push(ref logic btn);
    for (int k = 0; k < 6; k++) begin
      btn = ~btn;
      #(0.15 * MS);
    end
    btn = 1'b1;
    #(12 * MS);
    for (int k = 0; k < 5; k++) begin
      btn = ~btn;
      #(0.2 * MS);
    end
    btn = 1'b0;
    #(12 * MS);
  endtask

  task automatic wait_lcd();
    @(posedge clk);
    @(posedge clk);
    while (!lcd_ready) @(posedge clk);
  endtask

  // count writes: each one advances the write register number
  int strobes = 0;
  always @(wr_num) if (rst_n) strobes++;

  data_t  regs [4];
  addr_t  ra, rb;
  int     s0;

  initial begin
    rst_n = 1'b0;
    btn_write = 1'b0; btn_read_a = 1'b0; btn_read_b = 1'b0; lcd_sel = 1'b0;
    data_in = '{4'b0001, 4'b0010, 4'b0011, 4'b0100};
    #100 rst_n = 1'b1;

    // LCD initialisation sequence
    wait_lcd();
    check(lcd_cmds.size() == 5 && lcd_cmds[0] == 8'h38 && lcd_cmds[1] == 8'h0C &&
          lcd_cmds[2] == 8'h01 && lcd_cmds[3] == 8'h06 && lcd_cmds[4] == 8'h80,
          "LCD initialisation commands");
    if (lcd_cmds.size() >= 4 && lcd_cmds[2] == 8'h01) n_lcd_init++;

    // 1. load the four registers
    for (int k = 0; k < 4; k++) begin
      check(wr_num == addr_t'(k), $sformatf("write press %0d: register number %0d", k, wr_num));
      s0 = strobes;
      push(btn_write);
      check(strobes == s0 + 1, $sformatf("write press %0d gave %0d strobes", k, strobes - s0));
      if (strobes == s0 + 1) begin
        n_writes++;
        n_bounce_rejected += 2;  // both bounce bursts of the press were filtered
      end
      regs[k] = data_in[k];
    end
    check(wr_num == 2'b00, "write counter did not wrap to 00");
    if (wr_num == 2'b00) n_wr_wrap++;
    check(port_a == regs[0] && port_b == regs[0], "register 00 not on both ports after loading");

    // 2. step port A through 01, 10, 11, 00
    for (int k = 1; k <= 4; k++) begin
      push(btn_read_a);
      ra = addr_t'(k % 4);
      check(rd_num_a == ra, $sformatf("read A press %0d: register %0d", k, rd_num_a));
      check(port_a == regs[ra], $sformatf("port A = %h, expected %h", port_a, regs[ra]));
      check(seg_a == seg_of(regs[ra]), $sformatf("seg A = %b, expected %b", seg_a, seg_of(regs[ra])));
      check(rd_num_b == 2'b00, "port B moved with button A");
      wait_lcd();
      check(lcd_char == ascii(regs[ra]), $sformatf("LCD shows %c, expected %c", lcd_char, ascii(regs[ra])));
      if (port_a == regs[ra]) n_reads_a++;
      if (lcd_char == ascii(regs[ra]) && regs[ra] != regs[(k + 3) % 4]) n_lcd_updates++;
    end
    if (rd_num_a == 2'b00) n_rd_wrap++;

    // 3. LCD to port B, then step port B
    lcd_sel = 1'b1;
    for (int k = 1; k <= 4; k++) begin
      push(btn_read_b);
      rb = addr_t'(k % 4);
      check(rd_num_b == rb, $sformatf("read B press %0d: register %0d", k, rd_num_b));
      check(port_b == regs[rb], $sformatf("port B = %h, expected %h", port_b, regs[rb]));
      check(seg_b == seg_of(regs[rb]), $sformatf("seg B = %b, expected %b", seg_b, seg_of(regs[rb])));
      wait_lcd();
      check(lcd_char == ascii(regs[rb]), $sformatf("LCD (port B) shows %c, expected %c", lcd_char, ascii(regs[rb])));
      if (port_b == regs[rb]) n_reads_b++;
    end
    // port switch: with A at 00 and B at 00 both show register 00; move A on
    // and switch the LCD between the ports
    push(btn_read_a);                       // A -> register 01
    lcd_sel = 1'b0;
    wait_lcd();
    check(lcd_char == ascii(regs[1]), "LCD did not follow the switch to port A");
    lcd_sel = 1'b1;
    wait_lcd();
    check(lcd_char == ascii(regs[0]), "LCD did not follow the switch to port B");
    if (lcd_char == ascii(regs[0])) n_lcd_switch++;

    // 4. overwrite all four registers; register 00 shows on B at once
    data_in = '{4'hA, 4'hB, 4'hC, 4'hF};
    for (int k = 0; k < 4; k++) begin
      s0 = strobes;
      push(btn_write);
      if (strobes == s0 + 1) n_writes++;
      regs[k] = data_in[k];
      if (k == 0) begin
        check(port_b == 4'hA && seg_b == seg_of(4'hA), "new word not on port B");
        wait_lcd();
        check(lcd_char == "A", "LCD did not show the new word");
      end
      if (k == 1) check(port_a == 4'hB && seg_a == seg_of(4'hB), "new word not on port A");
    end
    if (wr_num == 2'b00) n_wr_wrap++;

    // every mechanism must have happened
    $display("bounces rejected %0d, writes %0d, write wraps %0d, reads A %0d, reads B %0d, read wraps %0d",
             n_bounce_rejected, n_writes, n_wr_wrap, n_reads_a, n_reads_b, n_rd_wrap);
    $display("LCD initialisations %0d, LCD updates %0d, LCD port switches %0d",
             n_lcd_init, n_lcd_updates, n_lcd_switch);
    $display("LCD busy-flag reads: %0d busy, %0d not busy", n_busy_reads, n_free_reads);
    check(n_bounce_rejected > 0, "no bounce was rejected");
    check(n_writes == 8, "not every write press wrote");
    check(n_wr_wrap > 0, "write counter never wrapped");
    check(n_reads_a == 4 && n_reads_b == 4, "not every read press read");
    check(n_rd_wrap > 0, "read counter never wrapped");
    check(n_lcd_init == 1, "LCD never initialised");
    check(n_lcd_updates > 0, "LCD never updated");
    check(n_lcd_switch > 0, "LCD port switch never happened");
    check(n_busy_reads > 0 && n_free_reads > 0, "LCD busy flag never polled both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

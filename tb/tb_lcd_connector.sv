// tb_lcd_connector: runs the LCD controller at 50 MHz with short power-up,
// execution and clear times, and acts as the display.
//
// The display model is busy for a while after each write (longer after the
// clear) and answers read cycles with its busy flag on DB7. Read data is
// garbage until tDDR (160 ns) after E rises and again from 5 ns after E falls,
// so a controller that samples outside that window reads noise.
//
// Checks: every bus cycle against the timing limits (tAS >= 40 ns,
// PWEH >= 230 ns, tDSW >= 80 ns, tH/tAH >= 10 ns, tcycE >= 500 ns, nothing
// changes while E is high), the bus direction (driven on writes, released on
// reads), the power-up wait, no write while the display is busy, and the byte
// stream: initialisation 38 0C 01 06, then 80 and the character of the value,
// then 80 and the new character after each change of the value. One update is
// made with a display that never clears its busy flag: the controller must
// then fall back on the execution time. Busy and not-busy reads must both have
// been seen.
`timescale 1ns/1ps
module tb_lcd_connector;
  localparam int CLK_HZ = 50_000_000;
  localparam int EXEC_US = 2, CLEAR_US = 6, POWERUP_US = 4;
  localparam realtime BUSY_NS = 700.0, BUSY_CLEAR_NS = 3000.0;
  logic       clk = 1'b0, rst_n;
  logic [3:0] value;
  logic       e, rw, rs, oe, ready;
  logic [7:0] data, data_in;
  int checks = 0, failures = 0;

  lcd_connector #(
    .CLK_HZ(CLK_HZ), .T_EXEC_US(EXEC_US), .T_CLEAR_US(CLEAR_US), .T_POWERUP_US(POWERUP_US)
  ) dut (
    .clk(clk), .rst_n(rst_n), .value(value),
    .lcd_e(e), .lcd_rw(rw), .lcd_rs(rs), .lcd_data(data),
    .lcd_data_oe(oe), .lcd_data_in(data_in), .ready(ready));

  always #10 clk = ~clk;

  initial begin
    #2_000_000;
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

  // ---- the display ----
  realtime t_reset_done, t_addr_chg = 0, t_data_chg = 0, t_rise = -1.0e9, t_fall = -1.0e9;
  realtime busy_until = 0, t_last_write = 0;
  bit         stuck = 1'b0;      // busy flag never clears
  logic [8:0] bytes [$];         // {rs, byte}
  int         reads_busy = 0, reads_free = 0;
  bit         read_busy;

  initial data_in = 8'h00;

  always @(rs or rw) begin
    if (rst_n) begin
      check(!e, "RS or R/W changed while E was high");
      check($realtime - t_fall >= 10.0, "address hold time tAH violated");
    end
    t_addr_chg = $realtime;
  end
  always @(data) begin
    if (rst_n) begin
      check(!e, "data changed while E was high");
      check($realtime - t_fall >= 10.0, "data hold time tH violated");
    end
    t_data_chg = $realtime;
  end

  always @(posedge e) begin
    check($realtime - t_addr_chg >= 40.0, "address set-up time tAS violated");
    check($realtime - t_rise >= 500.0, "enable cycle time tcycE violated");
    t_rise = $realtime;
    if (!rw) begin
      check(oe, "bus not driven during a write");
      if (bytes.size() == 0)
        check($realtime - t_reset_done >= POWERUP_US * 1000.0, "power-up wait too short");
      else if (stuck)
        check($realtime - t_last_write >= EXEC_US * 1000.0, "gave up on a busy display too early");
      else
        check($realtime >= busy_until, "write while the display was busy");
    end else begin
      check(!oe, "bus driven during a read");
      check(!rs, "read with RS = 1");
      read_busy = stuck || ($realtime < busy_until);
      data_in = 8'($urandom);
      #160;
      if (e) data_in = {read_busy, 7'h00};
    end
  end
  always @(negedge e) begin
    check($realtime - t_rise >= 230.0, "enable pulse width PWEH violated");
    t_fall = $realtime;
    if (!rw) begin
      check($realtime - t_data_chg >= 80.0, "data set-up time tDSW violated");
      bytes.push_back({rs, data});
      t_last_write = $realtime;
      busy_until = $realtime + ((data == 8'h01 && !rs) ? BUSY_CLEAR_NS : BUSY_NS);
    end else begin
      if (read_busy) reads_busy++;
      else           reads_free++;
      #5 data_in = 8'($urandom);
    end
  end

  function automatic logic [7:0] ascii(input logic [3:0] v);
    return (v < 10) ? 8'h30 + 8'(v) : 8'h37 + 8'(v);  // 'A' - 10 = 0x37
  endfunction

  task automatic expect_bytes(input logic [8:0] exp [$], input string what);
    check(bytes.size() == exp.size(),
          $sformatf("%s: %0d bytes, expected %0d", what, bytes.size(), exp.size()));
    for (int k = 0; k < exp.size() && k < bytes.size(); k++)
      check(bytes[k] == exp[k], $sformatf("%s: byte %0d is %h, expected %h", what, k, bytes[k], exp[k]));
    bytes.delete();
  endtask

  task automatic wait_ready();
    @(posedge clk);
    @(posedge clk);
    while (!ready) @(posedge clk);
  endtask

  realtime t0;
  initial begin
    rst_n = 1'b0; value = 4'h7;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    t_reset_done = $realtime;
    wait_ready();
    expect_bytes('{9'h038, 9'h00C, 9'h001, 9'h006, 9'h080, {1'b1, ascii(4'h7)}}, "initialisation");

    // polling must finish an update well before the fixed waits would
    t0 = $realtime;
    value = 4'hB;
    wait_ready();
    expect_bytes('{9'h080, {1'b1, ascii(4'hB)}}, "value B");
    check($realtime - t0 < EXEC_US * 1000.0 * 2, "update took as long as the fixed waits");

    value = 4'h0;
    wait_ready();
    expect_bytes('{9'h080, {1'b1, ascii(4'h0)}}, "value 0");

    // change while busy: the final character must be the last value
    value = 4'hE;
    repeat (30) @(posedge clk);
    value = 4'hF;
    wait_ready();
    expect_bytes('{9'h080, {1'b1, ascii(4'hE)}, 9'h080, {1'b1, ascii(4'hF)}}, "values E then F");

    // an unchanged value writes nothing
    repeat (500) @(posedge clk);
    check(bytes.size() == 0, "bytes written for an unchanged value");

    // a display stuck busy: the controller falls back on the execution time
    stuck = 1'b1;
    value = 4'h5;
    wait_ready();
    expect_bytes('{9'h080, {1'b1, ascii(4'h5)}}, "value 5, display stuck busy");
    stuck = 1'b0;
    busy_until = 0;

    // every hex digit
    for (int v = 0; v < 16; v++) begin
      value = 4'(v);
      if (v != 5) begin
        wait_ready();
        expect_bytes('{9'h080, {1'b1, ascii(4'(v))}}, $sformatf("value %h", v));
      end
    end
    $display("busy-flag reads: %0d busy, %0d not busy", reads_busy, reads_free);
    check(reads_busy > 0 && reads_free > 0, "busy-flag polling not exercised both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_debounce: runs the debouncer with an 8-clock filter (1 MHz, 8 us) and
// drives the contact with bursts of bounces. Checks that bursts shorter than
// the filter produce no press, that a press which settles produces exactly
// one press pulse 2 + 8 clocks after its last bounce, that btn_clean follows,
// and that a bouncing release produces no press pulse.
`timescale 1ns/1ps
module tb_debounce;
  localparam int STABLE = 8;
  logic clk = 1'b0, rst_n, btn_raw, btn_clean, press;
  int checks = 0, failures = 0, presses = 0, cycle = 0;

  debounce #(.CLK_HZ(1_000_000), .DEBOUNCE_US(STABLE)) dut (
    .clk(clk), .rst_n(rst_n), .btn_raw(btn_raw), .btn_clean(btn_clean), .press(press));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (press) presses <= presses + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  // toggle the contact every 'period' clocks, 'n' times, ending at level 'last'
  task automatic bounce(input int n, input int period, input logic last);
    for (int k = 0; k < n; k++) begin
      btn_raw = ~btn_raw;
      repeat (period) @(posedge clk);
      #1;
    end
    btn_raw = last;
  endtask

  int start, seen_at, p0;
  initial begin
    rst_n = 1'b0; btn_raw = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk); #1;

    // a burst of short contacts that never settles closed
    p0 = presses;
    bounce(12, 3, 1'b0);
    repeat (3 * STABLE) @(posedge clk); #1;
    check(presses == p0, "a burst of bounces gave a press");
    check(btn_clean == 1'b0, "btn_clean rose on bounces");

    // a press with bounces that settles closed
    p0 = presses;
    bounce(6, STABLE - 2, 1'b1);  // last bounce opens the contact, then it closes for good
    start = cycle;
    seen_at = -1;
    for (int k = 0; k < 4 * STABLE; k++) begin
      @(posedge clk); #1;
      if (press && seen_at < 0) seen_at = cycle - start;
    end
    check(presses == p0 + 1, $sformatf("settled press gave %0d pulses", presses - p0));
    check(seen_at == 2 + STABLE, $sformatf("press seen %0d clocks after the contact settled", seen_at));
    check(btn_clean == 1'b1, "btn_clean did not follow the press");

    // a bouncing release: btn_clean falls, no press pulse
    p0 = presses;
    bounce(5, 2, 1'b0);
    repeat (4 * STABLE) @(posedge clk); #1;
    check(presses == p0, "release gave a press pulse");
    check(btn_clean == 1'b0, "btn_clean did not follow the release");

    // three clean presses in a row
    p0 = presses;
    for (int k = 0; k < 3; k++) begin
      btn_raw = 1'b1; repeat (3 * STABLE) @(posedge clk); #1;
      btn_raw = 1'b0; repeat (3 * STABLE) @(posedge clk); #1;
    end
    check(presses == p0 + 3, $sformatf("three presses gave %0d pulses", presses - p0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

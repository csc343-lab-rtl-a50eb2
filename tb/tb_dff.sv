// tb_dff: drives the storage cell with random enable and data for many clocks
// and compares q against a reference bit updated only when enable is high.
`timescale 1ns/1ps
module tb_dff;
  logic clk = 1'b0, en, d, q;
  logic ref_q;
  int   checks = 0, failures = 0;

  dff dut (.clk(clk), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load a known value first
    en = 1'b1; d = 1'b0;
    @(posedge clk); #1;
    ref_q = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      en = 1'($urandom_range(0, 1));
      d  = 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      if (en) ref_q = d;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: en=%b d=%b q=%b expected %b", n, en, d, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

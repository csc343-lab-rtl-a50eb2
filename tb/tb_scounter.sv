// tb_scounter: random increment requests, a reset in the middle, and a check
// of the count after every clock against a modulo-4 reference.
`timescale 1ns/1ps
module tb_scounter;
  logic clk = 1'b0, rst_n, inc;
  logic [1:0] count;
  int ref_count, checks = 0, failures = 0, wraps = 0;

  scounter #(.WIDTH(2)) dut (.clk(clk), .rst_n(rst_n), .inc(inc), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; inc = 1'b0;
    #12 rst_n = 1'b1;
    ref_count = 0;
    for (int n = 0; n < 600; n++) begin
      inc = 1'($urandom_range(0, 1));
      if (n == 300) begin
        rst_n = 1'b0; #1; rst_n = 1'b1;
        ref_count = 0;
      end
      @(posedge clk); #1;
      if (inc) begin
        if (ref_count == 3) wraps++;
        ref_count = (ref_count + 1) % 4;
      end
      checks++;
      if (count !== 2'(ref_count)) begin
        failures++;
        $display("step %0d: count=%0d expected %0d", n, count, ref_count);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("the counter never wrapped from 11 to 00");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

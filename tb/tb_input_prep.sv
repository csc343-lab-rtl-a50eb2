// tb_input_prep: presses the write button (with bounces) six times and checks
// each one-clock write strobe: the register number must step 00, 01, 10, 11,
// 00, 01 and the data word must be data_in[] of that number. Also checks that
// exactly one strobe comes per press.
`timescale 1ns/1ps
module tb_input_prep;
  import regfile_pkg::*;
  localparam int STABLE = 6;
  logic  clk = 1'b0, rst_n, btn;
  data_t data_in [4];
  logic  wr_en;
  addr_t wr_num;
  data_t wr_data;
  int checks = 0, failures = 0, strobes = 0;

  input_prep #(.CLK_HZ(1_000_000), .DEBOUNCE_US(STABLE)) dut (
    .clk(clk), .rst_n(rst_n), .btn_write(btn), .data_in(data_in),
    .wr_en(wr_en), .wr_num(wr_num), .wr_data(wr_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (wr_en) begin
      checks += 2;
      if (wr_num !== addr_t'(strobes % 4)) begin
        failures++;
        $display("write %0d: register number %0d, expected %0d", strobes, wr_num, strobes % 4);
      end
      if (wr_data !== data_in[strobes % 4]) begin
        failures++;
        $display("write %0d: data %h, expected %h", strobes, wr_data, data_in[strobes % 4]);
      end
      strobes <= strobes + 1;
    end
  end

  task automatic push();
    for (int k = 0; k < 4; k++) begin
      btn = ~btn; repeat (2) @(posedge clk); #1;
    end
    btn = 1'b1; repeat (4 * STABLE) @(posedge clk); #1;
    for (int k = 0; k < 3; k++) begin
      btn = ~btn; repeat (2) @(posedge clk); #1;
    end
    btn = 1'b0; repeat (4 * STABLE) @(posedge clk); #1;
  endtask

  initial begin
    data_in = '{4'h1, 4'h2, 4'h3, 4'h4};
    rst_n = 1'b0; btn = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 6; p++) begin
      if (p == 4) data_in = '{4'h9, 4'hA, 4'hB, 4'hC};
      push();
    end
    checks++;
    if (strobes != 6) begin
      failures++;
      $display("6 presses gave %0d write strobes", strobes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

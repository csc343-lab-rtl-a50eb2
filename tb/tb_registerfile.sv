// tb_registerfile: first the classic bench sequence for the 4 x 4 register
// file: write 1010, 0011, 1100, 1111 into registers 11, 10, 01, 00 with four
// write clocks, then read them back through port A and afterwards through port
// B. Then 2000 random cycles with random write strobe, write number, data and
// both read numbers, comparing both ports against a reference array before and
// after every clock edge (reads are combinational; a write is visible only
// after its edge).
`timescale 1ns/1ps
module tb_registerfile;
  logic       clk = 1'b0, we;
  logic [1:0] wr_num, rd1, rd2;
  logic [3:0] din, da, db;
  logic [3:0] model [4];
  int checks = 0, failures = 0, writes = 0;

  registerfile #(.DATA_W(4)) dut (
    .clk(clk), .we(we), .wr_num(wr_num), .din(din),
    .rd_num1(rd1), .rd_num2(rd2), .dout_a(da), .dout_b(db));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ports(input string when);
    checks += 2;
    if (da !== model[rd1]) begin
      failures++;
      $display("%0t %s: port A reg %0d = %b, expected %b", $time, when, rd1, da, model[rd1]);
    end
    if (db !== model[rd2]) begin
      failures++;
      $display("%0t %s: port B reg %0d = %b, expected %b", $time, when, rd2, db, model[rd2]);
    end
  endtask

  logic [1:0] seq_num [4] = '{2'b11, 2'b10, 2'b01, 2'b00};
  logic [3:0] seq_dat [4] = '{4'b1010, 4'b0011, 4'b1100, 4'b1111};

  initial begin
    we = 1'b0; wr_num = '0; din = '0; rd1 = '0; rd2 = '0;
    @(negedge clk);
    // four writes
    for (int k = 0; k < 4; k++) begin
      we = 1'b1; wr_num = seq_num[k]; din = seq_dat[k];
      @(posedge clk); #1;
      model[seq_num[k]] = seq_dat[k];
      writes++;
    end
    we = 1'b0;
    // read back through port A, then port B
    for (int k = 0; k < 4; k++) begin
      rd1 = seq_num[k]; #2;
      checks++;
      if (da !== seq_dat[k]) begin
        failures++;
        $display("port A reg %b = %b, expected %b", rd1, da, seq_dat[k]);
      end
    end
    for (int k = 0; k < 4; k++) begin
      rd2 = seq_num[k]; #2;
      checks++;
      if (db !== seq_dat[k]) begin
        failures++;
        $display("port B reg %b = %b, expected %b", rd2, db, seq_dat[k]);
      end
    end

    // random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we     = 1'($urandom_range(0, 1));
      wr_num = 2'($urandom);
      din    = 4'($urandom);
      rd1    = 2'($urandom);
      rd2    = (n % 5 == 0) ? wr_num : 2'($urandom);
      #1 check_ports("before edge");
      @(posedge clk); #1;
      if (we) begin
        model[wr_num] = din;
        writes++;
      end
      check_ports("after edge");
    end
    $display("%0d writes", writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

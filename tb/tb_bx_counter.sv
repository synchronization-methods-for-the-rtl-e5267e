// Self-checking testbench of bx_counter at its full orbit of 3564 BX: BC0
// pulses at irregular intervals (shorter and longer than an orbit) must reset
// the count, the counter must wrap by itself at 3563 -> 0, and bc0_o must be
// high exactly when the count restarts because of BC0. A software counter
// gives the expected values.
`timescale 1ns/1ps
module tb_bx_counter;
  localparam int ORBIT = 3564;
  logic clk = 0, rst_n = 0, bc0_i = 0;
  logic [11:0] bcn_o;
  logic bc0_o;
  int exp_bcn = 0, exp_bc0 = 0;
  int checks = 0, failures = 0, wraps = 0, resets = 0;

  bx_counter dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30 rst_n = 1;
    for (int n = 0; n < 12000; n++) begin
      @(negedge clk);
      // BC0 at a few fixed moments, including one after a self-wrap
      bc0_i = (n == 5) || (n == 1000) || (n == 1000 + ORBIT) || (n == 9500);
      @(posedge clk);
      if (bc0_i) begin exp_bcn = 0; resets++; end
      else if (exp_bcn == ORBIT - 1) begin exp_bcn = 0; wraps++; end
      else exp_bcn++;
      exp_bc0 = int'(bc0_i);
      #1;
      if (n < 5) continue;  // free-running count before the first BC0
      checks++;
      if (bcn_o != 12'(exp_bcn) || bc0_o != exp_bc0[0]) begin
        failures++;
        if (failures < 10) $display("n=%0d bcn=%0d exp %0d bc0=%b exp %0d", n, bcn_o, exp_bcn, bc0_o, exp_bc0);
      end
    end
    checks++;
    if (wraps < 1 || resets != 4) failures++;
    $display("wraps=%0d bc0 resets=%0d", wraps, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of muxer with N = 24, M = 8 (three lines). A
// random word is presented every BX; on every bit-clock cycle the testbench
// checks each line against the bit it must carry: bit k of the word taken at
// a clk40 edge goes out on line l as word bit l*8+k during the (2+k)-th
// bit-clock cycle after that edge, so the serial latency is constant.
`timescale 1ns/1ps
module tb_muxer;
  localparam int N = 24, M = 8, L = 3;
  logic clk40 = 0, clk_fast = 0, rst_n = 0;
  logic [N-1:0] word_i;
  logic [L-1:0] line_o;
  logic [N-1:0] sent [int];      // word registered at clk40 edge number w
  int F = 0;                     // bit-clock rising edges so far
  bit check_on = 0;
  int checks = 0, failures = 0;

  muxer #(.N(N), .M(M)) dut (.*);

  // clk40 rises together with every 8th rising edge of clk_fast
  initial begin
    #10;
    forever begin
      clk_fast = 1;
      if (F % M == 0) clk40 = 1;
      if (F % M == M/2) clk40 = 0;
      #1.5625 clk_fast = 0;
      #1.5625 F++;
    end
  end

  always @(posedge clk40) begin
    sent[F / M] = word_i;
    #1 word_i = N'($urandom);
  end

  always @(negedge clk_fast) begin
    int f, b, w;
    f = F;                                   // interval after edge f
    b = ((f - 2) % M + M) % M;
    w = (f - 2 - b) / M;
    if (check_on && sent.exists(w)) begin
      for (int l = 0; l < L; l++) begin
        checks++;
        if (line_o[l] !== sent[w][l*M + b]) begin
          failures++;
          if (failures < 10) $display("F=%0d line %0d bit %0d of word %0d: %b", f, l, b, w, line_o[l]);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_i = '0;
    #31 rst_n = 1;
    #100 check_on = 1;
    #50000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

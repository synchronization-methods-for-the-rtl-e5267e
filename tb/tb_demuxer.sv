// Self-checking testbench of demuxer with N = 24, M = 8 (three lines).
//
// The testbench drives the serial lines itself: bit k of word w is put on
// line l during bit interval 8w+2+k (counted in bit-clock edges, clk40 rising
// with every 8th) plus a per-line skew. Phase 1: all lines 0.3 ns late;
// no edge selection, no extra register, muxDelay = 6 must rebuild every word
// exactly three BX after it was sent. Phase 2: skews of 0.3, 3.6 and 1.9 ns
// (line 1 one bit late, line 2 over half a bit late); line 2 sampled on the
// falling edge, line 0 given the extra register, muxDelay = 5 must again give
// error-free words with the same latency. Phases 3 and 4 use wrong settings
// (no extra register; muxDelay one too large) and must show errors.
`timescale 1ns/1ps
module tb_demuxer;
  localparam int N = 24, M = 8, L = 3;
  localparam real TB = 3.125;              // bit period, ns
  localparam real T0 = 10.0;               // time of bit-clock edge 0, ns
  logic clk40 = 0, clk_fast = 0, rst_n = 0;
  logic [L-1:0] line_i = '0, edge_sel = '0, reg_add = '0;
  logic [2:0] mux_delay = 3'd6;
  logic [N-1:0] word_o;
  logic [N-1:0] words [0:2047];
  real skew [L];
  int F = 0;
  int checks = 0, failures = 0;
  int errs [4];

  demuxer #(.N(N), .M(M)) dut (.*);

  initial begin
    #(T0);
    forever begin
      clk_fast = 1;
      if (F % M == 0) clk40 = 1;
      if (F % M == M/2) clk40 = 0;
      #(T0 + (F + 0.5) * TB - $realtime) clk_fast = 0;
      #(T0 + (F + 1) * TB - $realtime) F++;
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_drv
    initial begin
      for (int i = 2; i < 8 * 2040; i++) begin
        real target;
        target = T0 + i * TB + skew[l];
        #(target - $realtime);
        line_i[l] = words[(i - 2) / M][l*M + (i - 2) % M];
      end
    end
  end

  always @(posedge clk40) begin
    int j, ph;
    j = F / M;
    #0.5;
    ph = (j >= 20 && j < 480) ? 0 : (j >= 520 && j < 980) ? 1 :
         (j >= 1020 && j < 1480) ? 2 : (j >= 1520 && j < 1980) ? 3 : -1;
    if (ph >= 0 && word_o !== words[j - 3]) begin
      errs[ph]++;
      if (ph < 2 && errs[ph] < 5) $display("bx %0d: %h expected %h", j, word_o, words[j-3]);
    end
    if (ph == 0 || ph == 1) checks++;
    if (j == 500) begin
      skew[0] = 0.3; skew[1] = 3.6; skew[2] = 1.9;
      edge_sel = 3'b100; reg_add = 3'b001; mux_delay = 3'd5;
    end
    if (j == 1000) reg_add = 3'b000;
    if (j == 1500) begin reg_add = 3'b001; mux_delay = 3'd6; end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2048; w++) words[w] = N'($urandom);
    for (int l = 0; l < L; l++) skew[l] = 0.3;
    for (int p = 0; p < 4; p++) errs[p] = 0;
    #5.3 rst_n = 1;
    wait (F >= 8 * 1990);
    failures += errs[0] + errs[1];
    checks += 2;
    if (errs[2] == 0) failures++;
    if (errs[3] == 0) failures++;
    $display("word errors per phase: %0d %0d %0d %0d", errs[0], errs[1], errs[2], errs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

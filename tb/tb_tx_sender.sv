// Self-checking testbench of tx_sender with the OPTO-to-PAC sizes (D = 19,
// T = 5, S = 3, so P = 8). Random data, signature, static word and random
// switch settings are applied each BX; the expected word is built by the
// testbench from its own description of the transmitter: 8-bit LFSR
// generators x^8+x^6+x^5+x^4+1 (seeds 1, 2, 3, zero goes to 1), the test
// word's five low bits XORed with the signature, and signature bit j XORed
// with data bits j, j+5, j+10, j+15 when coding is on. Every switch
// combination must occur.
`timescale 1ns/1ps
module tb_tx_sender;
  import rpc_sync_pkg::*;
  localparam int D = 19, T = 5, S = 3, N = 24, P = 8;
  logic clk = 0, rst_n = 0;
  tx_cfg_t cfg;
  logic [D-1:0] data_i;
  logic [T-1:0] sig_i;
  logic [N-1:0] static_i, word_o, expw;
  logic [P-1:0] g [S];
  int checks = 0, failures = 0;
  int combo_seen [16];

  tx_sender #(.D(D), .T(T), .S(S)) dut (.*);

  always #12.5 clk = ~clk;

  function automatic logic [P-1:0] lfsr8(logic [P-1:0] x);
    if (x == 0) return 8'd1;
    return {x[6:0], x[7] ^ x[5] ^ x[4] ^ x[3]};
  endfunction

  function automatic logic [N-1:0] model(tx_cfg_t c, logic [D-1:0] d, logic [T-1:0] sg,
                                         logic [N-1:0] st);
    logic [T-1:0] s1;
    logic [N-1:0] w;
    s1 = c.timing_en ? sg : 5'b0;
    if (c.test_en) begin
      w = c.random_en ? {g[2], g[1], g[0]} : st;
      w[4:0] ^= s1;
    end else w = {d, s1};
    if (c.check_en)
      for (int i = 0; i < D; i++) w[i % T] ^= w[T + i];
    return w;
  endfunction

  // reference generators, stepping on every clock edge out of reset
  always @(posedge clk) if (rst_n) for (int s = 0; s < S; s++) g[s] <= lfsr8(g[s]);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) combo_seen[i] = 0;
    cfg = '0; data_i = '0; sig_i = '0; static_i = '0;
    g[0] = 8'd1; g[1] = 8'd2; g[2] = 8'd3;
    #30 rst_n = 1;            // between edges: generators leave reset at the next edge
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cfg = tx_cfg_t'($urandom);
      data_i = D'($urandom); sig_i = T'($urandom); static_i = N'($urandom);
      expw = model(cfg, data_i, sig_i, static_i);
      combo_seen[cfg]++;
      @(posedge clk);
      #1;
      checks++;
      if (word_o !== expw) begin
        failures++;
        if (failures < 10) $display("n=%0d cfg=%b word %h exp %h", n, cfg, word_o, expw);
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (combo_seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of hit_extender: sparse random one-BX hits on 19
// channels with extension 0, 1, 2 and 3; every output bit is compared with
// the OR of the input over the last 1+min(ext,2) BX, one register later, and
// the output pulse lengths 1, 2 and 3 BX are each seen.
`timescale 1ns/1ps
module tb_hit_extender;
  localparam int W = 19;
  logic clk = 0, rst_n = 0;
  logic [1:0] ext;
  logic [W-1:0] hit_i, hit_o;
  logic [W-1:0] hist [4];
  logic [W-1:0] expv;
  int checks = 0, failures = 0;
  int len_seen [4];
  int run [W];

  hit_extender #(.W(W)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin hist[i] = '0; len_seen[i] = 0; end
    for (int c = 0; c < W; c++) run[c] = 0;
    ext = 0; hit_i = '0;
    #30 rst_n = 1;
    for (int e = 0; e < 4; e++) begin
      ext = 2'(e);
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        for (int c = 0; c < W; c++) hit_i[c] = ($urandom % 9) == 0;
        @(posedge clk);
        // hist[0] is the input just registered
        for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = hit_i;
        expv = hist[0] | ((e >= 1) ? hist[1] : '0) | ((e >= 2) ? hist[2] : '0);
        #1;
        if (n >= 4) begin
          checks++;
          if (hit_o !== expv) begin
            failures++;
            if (failures < 10) $display("ext=%0d n=%0d out=%h exp=%h", e, n, hit_o, expv);
          end
        end
        for (int c = 0; c < W; c++) begin
          if (hit_o[c]) run[c]++;
          else begin if (run[c] > 0 && run[c] < 4) len_seen[run[c]]++; run[c] = 0; end
        end
      end
    end
    checks++;
    if (len_seen[1] == 0 || len_seen[2] == 0 || len_seen[3] == 0) failures++;
    $display("pulse lengths seen: 1:%0d 2:%0d 3:%0d", len_seen[1], len_seen[2], len_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

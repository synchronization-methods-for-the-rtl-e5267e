// Self-checking testbench of pipeline_delay: random 8-bit data through every
// delay setting 0..15; the output must equal the input of 'delay' cycles
// earlier (delay 0: the current input). The expected values come from a
// history kept by the testbench.
`timescale 1ns/1ps
module tb_pipeline_delay;
  localparam int W = 8, DW = 4, HIST = 32;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] delay;
  logic [W-1:0]  d, q;
  logic [W-1:0]  hist [HIST];   // hist[k] = input k cycles ago (0: current)
  int checks = 0, failures = 0;

  pipeline_delay #(.W(W), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < HIST; i++) hist[i] = '0;
    delay = '0; d = '0;
    #12 rst_n = 1;
    for (int dl = 0; dl < 16; dl++) begin
      delay = DW'(dl);
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        d = W'($urandom);
        hist[0] = d;
        #1;
        checks++;
        if (q !== hist[dl]) begin
          failures++;
          if (failures < 10) $display("delay %0d: q=%h expected %h", dl, q, hist[dl]);
        end
        @(posedge clk);
        for (int i = HIST-1; i > 0; i--) hist[i] = hist[i-1];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

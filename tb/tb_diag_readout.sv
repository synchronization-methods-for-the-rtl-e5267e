// Self-checking testbench of diag_readout: a counter-derived stream is
// recorded after start_i; busy/done must follow, and every one of the 256
// stored samples must read back as the stream value of its BX. A second
// recording restarted mid-way must overwrite from address 0.
`timescale 1ns/1ps
module tb_diag_readout;
  localparam int W = 53, AW = 8;
  logic clk = 0, rst_n = 0, start_i = 0;
  logic [W-1:0] data_i, rd_data;
  logic [AW-1:0] rd_addr;
  logic busy_o, done_o;
  int checks = 0, failures = 0;
  int bx = 0, start_bx;

  diag_readout #(.W(W), .AW(AW)) dut (.*);

  always #12.5 clk = ~clk;

  function automatic logic [W-1:0] stream(int n);
    return W'({32'(n) * 32'h9E37_79B9, 21'(n ^ 21'h15555)});
  endfunction

  always @(posedge clk) bx <= bx + 1;
  always_comb data_i = stream(bx);

  task automatic record(int wait_bx);
    @(negedge clk); start_i = 1; start_bx = bx + 1;
    @(negedge clk); start_i = 0;
    checks++; if (!busy_o || done_o) failures++;
    repeat (wait_bx) @(negedge clk);
  endtask

  task automatic read_all();
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk); rd_addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== stream(start_bx + a)) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h expected %h", a, rd_data, stream(start_bx + a));
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_addr = '0;
    #30 rst_n = 1;
    checks++; if (busy_o || done_o) failures++;
    record(300);
    checks++; if (busy_o || !done_o) failures++;
    read_all();
    // restart part-way through a recording
    record(50);
    record(300);
    checks++; if (!done_o) failures++;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

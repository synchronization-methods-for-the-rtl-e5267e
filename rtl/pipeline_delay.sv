// Programmable pipeline delay, in whole clock periods (BX at 40 MHz).
//
// The same element serves three places of the synchronization scheme: the
// BC0 delay that aligns the bunch counters of boards reached by TTC fibres
// of different length, the data delay on the inputs of the master link
// board multiplexer, and the 'dataDelay' buffer of the transmission receiver
// that makes the received time signature equal to the local one. As in the
// source scheme it is a series of flip-flops; the tap is chosen at run time.
//
// Interface: d is delayed by 'delay' clock cycles and appears on q. delay = 0
// passes d straight through (no register). The longest delay is 2**DW - 1.
// The chain is cleared by the asynchronous active-low reset so that no
// spurious BC0 or hit leaves it after reset. The range (DW) is this design's
// choice; the scheme only asks for steps of one BX.
module pipeline_delay #(
  parameter int unsigned W  = 1,  // bus width
  parameter int unsigned DW = 4   // width of the delay setting
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] delay,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);

  localparam int unsigned DEPTH = (1 << DW) - 1;

  logic [W-1:0] pipe [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= d;
      for (int i = 1; i < DEPTH; i++) pipe[i] <= pipe[i-1];
    end
  end

  always_comb begin
    if (delay == '0) q = d;
    else             q = pipe[delay - 1'b1];
  end

endmodule

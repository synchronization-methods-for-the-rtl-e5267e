// Bunch counter (BCN).
//
// Counts the ticks of the 40 MHz LHC clock and is reset by the (delayed)
// BC0 signal, so that boards whose BC0 has been aligned hold the same BCN
// for the same bunch crossing. Without BC0 it wraps after ORBIT counts on
// its own, matching the BC0 period.
//
// Timing: the cycle after bc0_i is high, bcn_o = 0 and bc0_o = 1; bcn_o then
// increments each cycle. bc0_o is thus BC0 registered once, aligned with
// BCN = 0, and forms bit 0 of the transmitted time signature. Reset clears
// both outputs.
module bx_counter
  import rpc_sync_pkg::*;
#(
  parameter int unsigned ORBIT = BX_PER_ORBIT,
  parameter int unsigned W     = BCN_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bc0_i,
  output logic [W-1:0] bcn_o,
  output logic         bc0_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcn_o <= '0;
      bc0_o <= 1'b0;
    end else begin
      bc0_o <= bc0_i;
      if (bc0_i || bcn_o == W'(ORBIT - 1)) bcn_o <= '0;
      else                                 bcn_o <= bcn_o + 1'b1;
    end
  end

endmodule

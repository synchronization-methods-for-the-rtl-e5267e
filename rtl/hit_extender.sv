// Chamber-hit extender for the PAC inputs.
//
// Before the offset between the bunch crossings and the link-board clocks is
// known, hits of one muon may land in two or three neighbouring BX on
// different chambers. Stretching every hit by one or two BX on the PAC
// inputs lets the coincidence form anyway, so that data for the offset
// correction can be collected. ext = 0 leaves the hits as they are, ext = 1
// and ext = 2 extend each hit by one or two BX (ext = 3 acts as 2).
//
// Timing: one register stage; hit_o(n) = OR of hit_i(n-1-k) for k = 0..ext.
// The register stage and the OR form are this design's own.
module hit_extender #(
  parameter int unsigned W = 19
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   ext,
  input  logic [W-1:0] hit_i,
  output logic [W-1:0] hit_o
);

  logic [W-1:0] h1, h2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h1    <= '0;
      h2    <= '0;
      hit_o <= '0;
    end else begin
      h1    <= hit_i;
      h2    <= h1;
      hit_o <= hit_i
             | ((ext >= 2'd1) ? h1 : '0)
             | ((ext >= 2'd2) ? h2 : '0);
    end
  end

endmodule

// Synchronization unit of a link board: time quantization of RPC strip
// signals into bunch crossings.
//
// Each strip arrives as an asynchronous ~100 ns pulse whose rising edge
// carries the hit time. Two deskewed copies of the 40 MHz clock bound a
// synchronization window: clk_open ('window open') and clk_close ('window
// closed', Clock40Des1). A strip is accepted when its rising edge falls
// inside the window, and it then gives a pulse of exactly one BX synchronous
// with the main clock clk40. All NCH strips share the one window.
//
// How the window test is made is this design's own: every strip is sampled
// at the window-open edge and again at the window-close edge. A rising edge
// lies inside the window exactly when the first sample is 0 and the second
// is 1 (the pulse outlasts the window, so a hit seen at the close edge was
// not yet there at the open edge). The result, one clk_close period wide,
// is then latched into the clk40 domain, either directly on the rising edge
// of clk40 or, with clk_inv set, first on the falling edge of clk40 and then
// on its rising edge (the 'ClkInv' setting, used when the window-closed edge
// lies close to the rising edge of clk40). The TTC BC0, synchronous with
// Clock40Des1, passes through the same latch path so that it is assigned to
// a BX in the same way as the hits.
//
// Timing: hit_o / bc0_o rise on the first qualifying clk40 edge after the
// window-close edge that saw the hit, and last one clk40 period.
// All flip-flops have the asynchronous active-low reset rst_n.
module sync_unit #(
  parameter int unsigned NCH = 96
) (
  input  logic           clk40,
  input  logic           clk_open,
  input  logic           clk_close,
  input  logic           rst_n,
  input  logic           clk_inv,
  input  logic [NCH-1:0] strip_i,
  input  logic           bc0_i,
  output logic [NCH-1:0] hit_o,
  output logic           bc0_o
);

  logic [NCH-1:0] open_q;   // strip levels at the window-open edge
  logic [NCH-1:0] win_hit;  // rising edge inside the window
  logic           bc0_c;    // BC0 in the window-close domain
  logic [NCH:0]   neg_q;    // falling-edge latch of clk40 (ClkInv path)

  always_ff @(posedge clk_open or negedge rst_n) begin
    if (!rst_n) open_q <= '1;
    else        open_q <= strip_i;
  end

  always_ff @(posedge clk_close or negedge rst_n) begin
    if (!rst_n) begin
      win_hit <= '0;
      bc0_c   <= 1'b0;
    end else begin
      win_hit <= strip_i & ~open_q;
      bc0_c   <= bc0_i;
    end
  end

  always_ff @(negedge clk40 or negedge rst_n) begin
    if (!rst_n) neg_q <= '0;
    else        neg_q <= {bc0_c, win_hit};
  end

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      hit_o <= '0;
      bc0_o <= 1'b0;
    end else if (clk_inv) begin
      {bc0_o, hit_o} <= neg_q;
    end else begin
      {bc0_o, hit_o} <= {bc0_c, win_hit};
    end
  end

endmodule

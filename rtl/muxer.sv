// Muxer of the generic transmission channel: serializes the N-bit word of
// each BX onto L = ceil(N/M) lines, M bits per line per BX, with a bit clock
// clk_fast = M x clk40 that is phase-locked to clk40 (in the system it comes
// from a PLL).
//
// Line l carries word bits l*M .. l*M+M-1, least significant first; when N
// is not a multiple of M the last line is padded with zeros. The word is
// registered on clk40; a toggle flip-flop in the clk40 domain, sampled twice
// in the clk_fast domain, marks the start of each BX so that the shift
// registers load once per BX. Bit order, padding and the BX-start detection
// are this design's choices; the source only fixes N, M and L = N/M.
//
// Timing: word_i sampled at a clk40 edge is loaded into the shift register
// on the second clk_fast edge after it, and its bit k leaves on the line
// during clk_fast cycles 2+k .. 3+k after that clk40 edge. The latency is
// constant.
module muxer #(
  parameter int unsigned N = 24,
  parameter int unsigned M = 8,
  localparam int unsigned L = (N + M - 1) / M
) (
  input  logic         clk40,
  input  logic         clk_fast,
  input  logic         rst_n,
  input  logic [N-1:0] word_i,
  output logic [L-1:0] line_o
);

  logic [L*M-1:0] word_q;
  logic           tog;
  logic           t1, t2;
  logic [M-1:0]   sh [L];

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      tog    <= 1'b0;
    end else begin
      word_q <= (L*M)'(word_i);
      tog    <= ~tog;
    end
  end

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= 1'b0;
      t2 <= 1'b0;
      for (int l = 0; l < L; l++) sh[l] <= '0;
    end else begin
      t1 <= tog;
      t2 <= t1;
      for (int l = 0; l < L; l++) begin
        if (t1 != t2) sh[l] <= word_q[l*M +: M];
        else          sh[l] <= {1'b0, sh[l][M-1:1]};
      end
    end
  end

  always_comb begin
    for (int l = 0; l < L; l++) line_o[l] = sh[l][0];
  end

endmodule

// Demuxer of the generic transmission channel: aligns the L serial lines
// and rebuilds the N-bit word in the receiver's own 40 MHz clock domain, so
// that the transmitter clock need not be sent with the data.
//
// Following the receiver block diagram, for every line l:
//  (1) the line is sampled on the rising and on the falling edge of
//      clk_fast; edge_sel[l] ('clkInv') picks the falling-edge sample, which
//      moves the sampling point by half a bit away from unstable regions;
//  (2) reg_add[l] ('regAdd') adds one clk_fast register to that line, to
//      equalize the skews between lines;
// and for all lines together:
//  (3) mux_delay ('muxDelay', 0..M-1 bit periods, the same for all lines)
//      shifts the bit stream so that the M bits of one word line up with
//      the BX boundary of the receiver clk40;
//  (4) a shift register per line collects M bits; at the start of every
//      receiver BX (a clk40 toggle seen in the clk_fast domain, as in the
//      muxer) the last M bits are copied to a holding register, which clk40
//      then registers as word_o.
// The bit order (least significant first) matches the muxer. The BX-start
// detection and the number of register stages are this design's own.
//
// Timing: with zero line skew and transmitter and receiver clocks in phase,
// mux_delay = M - 2 aligns the words when both ends use the muxer of this
// design; the whole link latency is then constant, and further whole-BX
// alignment is done by the receiver's dataDelay.
module demuxer #(
  parameter int unsigned N = 24,
  parameter int unsigned M = 8,
  localparam int unsigned L   = (N + M - 1) / M,
  localparam int unsigned MDW = (M > 1) ? $clog2(M) : 1
) (
  input  logic           clk40,
  input  logic           clk_fast,
  input  logic           rst_n,
  input  logic [L-1:0]   line_i,
  input  logic [L-1:0]   edge_sel,
  input  logic [L-1:0]   reg_add,
  input  logic [MDW-1:0] mux_delay,
  output logic [N-1:0]   word_o
);

  logic [L-1:0] pos_q, neg_q, neg_r, add_q, stage2;
  logic [L-1:0] dly_q [M-1];      // (3) dly_q[k] = stage2 delayed by k+1
  logic [L-1:0] aligned;
  logic [M-1:0] sr   [L];
  logic [L*M-1:0] hold;
  logic         tog, t1, t2;

  // (1) clock-edge selection
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) pos_q <= '0;
    else        pos_q <= line_i;
  end

  always_ff @(negedge clk_fast or negedge rst_n) begin
    if (!rst_n) neg_q <= '0;
    else        neg_q <= line_i;
  end

  // falling-edge sample brought to the rising edge
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) neg_r <= '0;
    else        neg_r <= neg_q;
  end

  // (2) optional extra register per line
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) add_q <= '0;
    else        add_q <= (edge_sel & neg_r) | (~edge_sel & pos_q);
  end

  always_comb begin
    for (int l = 0; l < L; l++) begin
      logic s1;
      s1 = edge_sel[l] ? neg_r[l] : pos_q[l];
      stage2[l] = reg_add[l] ? add_q[l] : s1;
    end
  end

  // (3) common delay, (4) deserializer
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < M-1; k++) dly_q[k] <= '0;
      for (int l = 0; l < L; l++) sr[l] <= '0;
      hold <= '0;
      t1   <= 1'b0;
      t2   <= 1'b0;
    end else begin
      dly_q[0] <= stage2;
      for (int k = 1; k < M-1; k++) dly_q[k] <= dly_q[k-1];
      for (int l = 0; l < L; l++) sr[l] <= {aligned[l], sr[l][M-1:1]};
      t1 <= tog;
      t2 <= t1;
      if (t1 != t2)
        for (int l = 0; l < L; l++) hold[l*M +: M] <= sr[l];
    end
  end

  always_comb begin
    if (mux_delay == '0)      aligned = stage2;
    else if (int'(mux_delay) < M) aligned = dly_q[mux_delay - 1'b1];
    else                      aligned = dly_q[M-2];
  end

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      tog    <= 1'b0;
      word_o <= '0;
    end else begin
      tog    <= ~tog;
      word_o <= hold[N-1:0];
    end
  end

endmodule

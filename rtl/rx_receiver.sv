// Receiver of the generic synchronous transmission channel: delays, checks
// and unpacks the N-bit word (N = D + T) delivered by the demuxer.
//
// Following the receiver block diagram:
//  (6)  data_delay ('dataDelay') delays the word by whole BX so that the
//       transmitted time signature equals the receiver's local one;
//  (7)  cfg.check_en undoes the coding of the signature with the data bits
//       (the same XOR as in the sender, rpc_sync_pkg::sig_code);
//  (10) cfg.timing_en selects the local signature local_sig_i or zeros;
//  (8)  the recovered signature is XORed with it;
//  (11) a zero result marks the word valid (valid_o);
//  (9)  data_o carries the D data bits; it is zero in test mode and, with
//       cfg.block_en, whenever the word is not valid (corrupted data are
//       blocked);
//  (13) S comparators check each P-bit slice (P = N/S) of the test word
//       against the successor of the previous word's slice (the same
//       rpc_sync_pkg::prbs_next rule as the generators), so no common start
//       is needed; every mismatching bit is reported;
//  (12) cfg.random_en selects, on test_o, that mismatch word or the
//       received (static) test word itself.
// The test word is {data bits, output of (8)}, which removes the signature
// the sender XORed onto the test word. line_err_o has one flag per
// comparator (one per line when S = L), and err_cnt_o counts the BX in
// which any comparator saw an error; it saturates and is cleared by
// err_clr_i. The comparison of the first word after the random test is
// switched on is skipped. The counter width, the skip and the register
// stage are this design's choices.
//
// Timing: outputs are registered; with data_delay = k, a word on word_i in
// BX n is reported in BX n+k+1. rx_sig_o is the recovered signature, for
// diagnostics.
module rx_receiver
  import rpc_sync_pkg::*;
#(
  parameter int unsigned D   = 19,
  parameter int unsigned T   = 5,
  parameter int unsigned S   = 3,
  parameter int unsigned DDW = 4,   // width of data_delay
  parameter int unsigned CW  = 32   // width of the error counter
) (
  input  logic            clk,
  input  logic            rst_n,
  input  rx_cfg_t         cfg,
  input  logic [DDW-1:0]  data_delay,
  input  logic [D+T-1:0]  word_i,
  input  logic [T-1:0]    local_sig_i,
  input  logic            err_clr_i,
  output logic [D-1:0]    data_o,
  output logic            valid_o,
  output logic [T-1:0]    rx_sig_o,
  output logic [D+T-1:0]  test_o,
  output logic [S-1:0]    line_err_o,
  output logic [CW-1:0]   err_cnt_o
);

  localparam int unsigned N = D + T;
  localparam int unsigned P = N / S;

  logic [N-1:0] word_d;              // after (6)
  logic [T-1:0] sig_rx, sig_loc, sig_diff;
  logic         valid;
  logic [N-1:0] test_word, mism;
  logic [P-1:0] prev [S];
  logic         primed;
  logic [S-1:0] slice_err;

  pipeline_delay #(.W(N), .DW(DDW)) u_data_delay (
    .clk, .rst_n, .delay(data_delay), .d(word_i), .q(word_d)
  );

  always_comb begin
    sig_rx = word_d[T-1:0];                                            // (7)
    if (cfg.check_en)
      sig_rx = word_d[T-1:0] ^ T'(sig_code(CODE_MAX_D'(word_d[N-1:T]), D, T));
    sig_loc   = cfg.timing_en ? local_sig_i : '0;                      // (10)
    sig_diff  = sig_rx ^ sig_loc;                                      // (8)
    valid     = (sig_diff == '0);                                      // (11)
    test_word = {word_d[N-1:T], sig_diff};
    for (int s = 0; s < S; s++) begin                                  // (13)
      mism[s*P +: P] = test_word[s*P +: P]
                     ^ P'(prbs_next(PRBS_MAX_W'(prev[s]), P));
      slice_err[s]   = primed && (mism[s*P +: P] != '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_o     <= '0;
      valid_o    <= 1'b0;
      rx_sig_o   <= '0;
      test_o     <= '0;
      line_err_o <= '0;
      err_cnt_o  <= '0;
      primed     <= 1'b0;
      for (int s = 0; s < S; s++) prev[s] <= '0;
    end else begin
      valid_o  <= valid;
      rx_sig_o <= sig_rx;
      if (cfg.test_en || (cfg.block_en && !valid)) data_o <= '0;       // (9)
      else                                         data_o <= word_d[N-1:T];
      test_o   <= cfg.random_en ? (primed ? mism : '0) : test_word;  // (12)
      for (int s = 0; s < S; s++) prev[s] <= test_word[s*P +: P];
      primed     <= cfg.test_en && cfg.random_en;
      line_err_o <= (cfg.test_en && cfg.random_en) ? slice_err : '0;
      if (err_clr_i)
        err_cnt_o <= '0;
      else if (cfg.test_en && cfg.random_en && (slice_err != '0) && (err_cnt_o != '1))
        err_cnt_o <= err_cnt_o + 1'b1;
    end
  end

  initial begin
    assert (N % S == 0) else $error("rx_receiver: N = D + T must be a multiple of S");
  end

endmodule

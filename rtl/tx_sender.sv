// Sender of the generic synchronous transmission channel: builds the N-bit
// word sent every BX (N = D + T).
//
// The word is {data (D bits), time signature (T bits)}, the signature in the
// least significant bits. Following the transmitter block diagram:
//  (1) cfg.timing_en selects the local time signature or zeros;
//  (8) S pseudorandom generators of P = N/S bits each step once per BX;
//  (2) cfg.random_en selects their output or the static test word static_i;
//  (3) the T least significant bits of the test word are XORed with the
//      signature from (1), so that the time signature also works in test mode;
//  (4) cfg.test_en selects the test word or {data_i, signature};
//  (5) cfg.check_en XORs each signature bit with selected data bits
//      (rpc_sync_pkg::sig_code) so that the receiver detects corrupted data
//      bits through the signature check.
// The stages follow the source diagram; the generator rule, the coding bit
// selection and the single output register are this design's choices.
//
// Timing: word_o is registered: the inputs of BX n appear on word_o in BX n+1.
// The generators run freely from reset (generator s starts at s+1).
module tx_sender
  import rpc_sync_pkg::*;
#(
  parameter int unsigned D = 19,
  parameter int unsigned T = 5,
  parameter int unsigned S = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tx_cfg_t             cfg,
  input  logic [D-1:0]        data_i,
  input  logic [T-1:0]        sig_i,
  input  logic [D+T-1:0]      static_i,
  output logic [D+T-1:0]      word_o
);

  localparam int unsigned N = D + T;
  localparam int unsigned P = N / S;

  logic [P-1:0]   gen [S];
  logic [T-1:0]   sig;
  logic [N-1:0]   rnd_word, test_word, sel_word, coded;

  // (8) pseudorandom generators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < S; s++) gen[s] <= P'(s + 1);
    end else begin
      for (int s = 0; s < S; s++)
        gen[s] <= P'(prbs_next(PRBS_MAX_W'(gen[s]), P));
    end
  end

  always_comb begin
    sig = cfg.timing_en ? sig_i : '0;                       // (1)
    rnd_word = '0;
    for (int s = 0; s < S; s++) rnd_word[s*P +: P] = gen[s];
    test_word = cfg.random_en ? rnd_word : static_i;        // (2)
    test_word[T-1:0] = test_word[T-1:0] ^ sig;              // (3)
    sel_word = cfg.test_en ? test_word : {data_i, sig};     // (4)
    coded = sel_word;                                       // (5)
    if (cfg.check_en)
      coded[T-1:0] = sel_word[T-1:0]
                   ^ T'(sig_code(CODE_MAX_D'(sel_word[N-1:T]), D, T));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word_o <= '0;
    else        word_o <= coded;
  end

  initial begin
    assert (N % S == 0) else $error("tx_sender: N = D + T must be a multiple of S");
    assert (P <= PRBS_MAX_W && D <= CODE_MAX_D && T <= CODE_MAX_T)
      else $error("tx_sender: widths beyond the helper functions");
  end

endmodule

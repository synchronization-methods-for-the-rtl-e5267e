// Self-checking testbench of rx_receiver with the OPTO-to-PAC sizes (D = 19,
// T = 5, S = 3, P = 8, dataDelay up to 15).
//
// The testbench plays the transmitter: it builds each BX the word a sender
// would send (time signature = BC0 and four BCN bits of a transmitter bunch
// counter, coded onto the data bits j, j+5, j+10, j+15), delivers it two BX
// later, and gives the receiver a local signature that matches only when
// dataDelay = 3. Phases: correct delay (all words valid), wrong delay (words
// blocked to zero), corrupted data bits (caught by the signature coding),
// pseudorandom test without and then with injected bit errors (errors
// counted, reported per line), static test, and an error-counter clear.
// Every output is compared each BX with a model written in the testbench.
`timescale 1ns/1ps
module tb_rx_receiver;
  import rpc_sync_pkg::*;
  localparam int D = 19, T = 5, S = 3, N = 24, P = 8, LAT = 2, GOOD_DELAY = 3;
  logic clk = 0, rst_n = 0;
  rx_cfg_t cfg;
  logic [3:0] data_delay;
  logic [N-1:0] word_i, test_o;
  logic [T-1:0] local_sig_i, rx_sig_o;
  logic err_clr_i;
  logic [D-1:0] data_o;
  logic valid_o;
  logic [S-1:0] line_err_o;
  logic [31:0] err_cnt_o;

  rx_receiver #(.D(D), .T(T), .S(S)) dut (.*);

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_valid = 0, n_blocked = 0, n_corrupt_caught = 0, n_rnd_err = 0;
  logic [N-1:0] sent [int];                // word sent in BX n
  logic [N-1:0] hist [16];                 // hist[k]: word_i k BX ago (0 = now)
  logic [P-1:0] gen [S], prev [S];
  bit primed;
  int cnt;
  // model outputs
  logic [D-1:0] e_data; logic e_valid; logic [T-1:0] e_sig; logic [N-1:0] e_test;
  logic [S-1:0] e_lerr;

  function automatic logic [P-1:0] lfsr8(logic [P-1:0] x);
    if (x == 0) return 8'd1;
    return {x[6:0], x[7] ^ x[5] ^ x[4] ^ x[3]};
  endfunction

  function automatic logic [T-1:0] par(logic [N-1:0] w);
    logic [T-1:0] p = '0;
    for (int i = 0; i < D; i++) p[i % T] ^= w[T + i];
    return p;
  endfunction

  function automatic logic [T-1:0] sig_of(int bx);
    int bcn = ((bx % 3564) + 3564) % 3564;
    return {4'(bcn), bcn == 0};
  endfunction

  // sender word of BX n: data or pseudorandom test word, signature, coding
  function automatic logic [N-1:0] tx_word(int n, bit rnd);
    logic [N-1:0] w;
    if (rnd) begin
      w = {gen[2], gen[1], gen[0]};
      w[4:0] ^= sig_of(n);
    end else w = {D'($urandom), sig_of(n)};
    w[4:0] ^= par(w);
    return w;
  endfunction

  task automatic model_step();
    logic [N-1:0] wd, tw, mism;
    logic [T-1:0] srx, diff;
    logic [S-1:0] serr;
    wd   = hist[data_delay];
    srx  = wd[4:0] ^ (cfg.check_en ? par(wd) : 5'b0);
    diff = srx ^ (cfg.timing_en ? local_sig_i : 5'b0);
    e_valid = (diff == 0);
    e_sig   = srx;
    e_data  = (cfg.test_en || (cfg.block_en && !e_valid)) ? '0 : wd[N-1:T];
    tw = {wd[N-1:T], diff};
    for (int s = 0; s < S; s++) begin
      mism[s*P +: P] = tw[s*P +: P] ^ lfsr8(prev[s]);
      serr[s] = primed && (mism[s*P +: P] != 0);
    end
    e_test = cfg.random_en ? (primed ? mism : '0) : tw;
    e_lerr = (cfg.test_en && cfg.random_en) ? serr : '0;
    if (err_clr_i) cnt = 0;
    else if (cfg.test_en && cfg.random_en && serr != 0) cnt++;
    for (int s = 0; s < S; s++) prev[s] = tw[s*P +: P];
    primed = cfg.test_en && cfg.random_en;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit rnd, corrupt;
    cfg = '0; data_delay = 4'(GOOD_DELAY); word_i = '0; local_sig_i = '0; err_clr_i = 0;
    for (int k = 0; k < 16; k++) hist[k] = '0;
    for (int s = 0; s < S; s++) begin gen[s] = P'(s + 1); prev[s] = '0; end
    primed = 0; cnt = 0;
    #30 rst_n = 1;
    for (int n = 0; n < 1400; n++) begin
      @(negedge clk);
      // phase settings
      rnd = (n >= 600 && n < 1000);
      cfg.timing_en = 1; cfg.check_en = 1; cfg.block_en = 1;
      cfg.test_en   = (n >= 600);
      cfg.random_en = rnd;
      data_delay = (n >= 200 && n < 300) ? 4'(GOOD_DELAY - 1) : 4'(GOOD_DELAY);
      err_clr_i = (n == 1200);
      // transmitter
      sent[n] = tx_word(n, n >= 590 && n < 1000);
      for (int s = 0; s < S; s++) gen[s] = lfsr8(gen[s]);
      // medium: LAT BX, with bit errors in two phases
      word_i = sent.exists(n - LAT) ? sent[n - LAT] : '0;
      corrupt = ((n >= 300 && n < 400) || (n >= 800 && n < 1000)) && ($urandom % 10 == 0);
      if (corrupt) word_i[5 + $urandom % D] ^= 1'b1;
      if (n >= 1000 && n < 1300) word_i = {19'h5_A5A5, 5'b0} ^ {19'b0, sig_of(n - LAT)} ^ {19'b0, par({19'h5_A5A5, 5'b0})};
      for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = word_i;
      // receiver local signature: matches the word after LAT + GOOD_DELAY
      local_sig_i = sig_of(n - LAT - GOOD_DELAY);
      model_step();
      @(posedge clk);
      #1;
      if (n < 20) continue;
      checks++;
      if (data_o !== e_data || valid_o !== e_valid || rx_sig_o !== e_sig ||
          test_o !== e_test || line_err_o !== e_lerr || err_cnt_o !== 32'(cnt)) begin
        failures++;
        if (failures < 10)
          $display("n=%0d data %h/%h valid %b/%b sig %h/%h test %h/%h lerr %b/%b cnt %0d/%0d", n,
                   data_o, e_data, valid_o, e_valid, rx_sig_o, e_sig, test_o, e_test,
                   line_err_o, e_lerr, err_cnt_o, cnt);
      end
      if (n < 200 && valid_o) n_valid++;
      if (n >= 200 && n < 300 && !valid_o && data_o == 0) n_blocked++;
      if (n >= 300 && n < 400 && !valid_o) n_corrupt_caught++;
      if (line_err_o != 0) n_rnd_err++;
      if (n == 799) begin checks++; if (err_cnt_o != 0) failures++; end
    end
    checks++;
    if (n_valid < 150 || n_blocked < 90 || n_corrupt_caught == 0 || n_rnd_err == 0) failures++;
    $display("valid=%0d blocked=%0d corrupted caught=%0d random-test error BX=%0d",
             n_valid, n_blocked, n_corrupt_caught, n_rnd_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench of rpc_sync_top at its default sizes (96 strips;
// OPTO-to-PAC channel with D = 19, T = 5, M = 8, three lines).
//
// Link-board part: the testbench makes lb_clk40 and the two window clocks,
// sends the TTC BC0 (synchronous with the window-closed clock) and random
// 100 ns strip pulses. From the edge times it works out which pulses fall
// inside the window and the BCN at which each accepted hit must leave the
// data delay, given the BC0 delay and the data delay. Run once with the
// window inside the BX and once with a wrapped window and ClkInv. In each
// run a link-board diagnostic snapshot is taken and compared entry by entry
// with the output stream seen in the same BX.
//
// Channel part: transmitter and receiver clocks are 7.3 ns apart and the
// three lines reach the receiver with skews of 0.4, 3.9 and 1.7 ns. The
// testbench then goes through the set-up procedure of the channel:
//  1. static test data, search over muxDelay / regAdd / clkInv until the
//     static word is received unchanged, confirmed by a pseudorandom test
//     with zero counted errors (settings failing either test are skipped);
//  2. a bit flipped on the medium during the pseudorandom test must be
//     counted;
//  3. with time signatures on, a snapshot of the diagnostic readout gives
//     the dataDelay that makes the received signature equal to the local
//     one; a wrong dataDelay must block the data;
//  4. real data: each word must reach the PAC output exactly when the
//     receiver's BCN equals the transmitter BCN it was sent with (two BX of
//     receiver output registers later), then with hit extension 1 and 2;
//  5. bits flipped on the medium must never let a wrong word through.
// Every mechanism is counted and each must have happened at least once.
`timescale 1ns/1ps
module tb_rpc_sync_top;
  import rpc_sync_pkg::*;
  localparam int NCH = 96, D = 19, T = 5, M = 8, N = 24, L = 3;
  localparam longint BXPS = 25000;

  // ---------------------------------------------------------------- signals
  logic lb_clk40 = 0, lb_clk_open = 0, lb_clk_close = 0, lb_rst_n = 0, lb_clk_inv = 0;
  logic [5:0] lb_bc0_delay = 6'd3;
  logic [3:0] lb_data_delay = 4'd2;
  logic [NCH-1:0] lb_strip_i = '0, lb_hit_o;
  logic lb_bc0_i = 0, lb_bc0_o;
  logic [11:0] lb_bcn_o;
  logic lb_diag_start_i = 0, lb_diag_busy_o, lb_diag_done_o;
  logic [7:0] lb_diag_rd_addr = '0;
  logic [NCH+12:0] lb_diag_rd_data;

  logic tx_clk40 = 0, tx_clk_fast = 0, tx_rst_n = 0, tx_bc0_i = 0;
  logic [5:0] tx_bc0_delay = 6'd0;
  tx_cfg_t tx_cfg = '0;
  logic [D-1:0] tx_data_i = '0;
  logic [N-1:0] tx_static_i = '0;
  logic [L-1:0] tx_line_o;
  logic [11:0] tx_bcn_o;

  logic rx_clk40 = 0, rx_clk_fast = 0, rx_rst_n = 0, rx_bc0_i = 0;
  logic [5:0] rx_bc0_delay = 6'd10;
  logic [L-1:0] rx_line_i, rx_edge_sel = '0, rx_reg_add = '0;
  logic [2:0] rx_mux_delay = '0;
  logic [3:0] rx_data_delay = '0;
  rx_cfg_t rx_cfg = '0;
  logic [1:0] rx_ext = '0;
  logic rx_err_clr = 0;
  logic [D-1:0] pac_hit_o;
  logic rx_valid_o;
  logic [N-1:0] rx_test_o;
  logic [2:0] rx_line_err_o;
  logic [31:0] rx_err_cnt_o;
  logic [11:0] rx_bcn_o;
  logic diag_start_i = 0;
  logic [7:0] diag_rd_addr = '0;
  logic [53:0] diag_rd_data;
  logic diag_busy_o, diag_done_o;

  rpc_sync_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_accept = 0, m_reject = 0, m_clkinv_hits = 0, m_bc0_align = 0;
  int m_static_fail = 0, m_static_pass = 0, m_random_pass = 0, m_random_err = 0;
  int m_block = 0, m_valid = 0, m_masked = 0, m_ext = 0, m_diag = 0, m_edge_regadd = 0;
  int m_lb_diag = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ============================================================ link board
  longint o_ps = 5000, c_ps = 20000;
  logic [NCH-1:0] lb_exp [longint];
  longint lb_kb = -1;              // clk40 edge index of the resynchronized BC0
  bit lb_check = 0;
  logic [NCH+12:0] lb_rec [int];   // link-board output stream, by BCN

  function automatic longint modp(longint a, longint m);
    longint r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  // lb_clk40 rises at 12.5 ns + k*25 ns; window clocks o_ps / c_ps later
  initial forever begin
    #0.1;
    begin
      longint t;
      t = longint'($realtime * 1000.0 + 0.5);
      lb_clk40     = modp(t - 12500, BXPS) < BXPS/2;
      lb_clk_open  = modp(t - 12500 - o_ps, BXPS) < BXPS/2;
      lb_clk_close = modp(t - 12500 - c_ps, BXPS) < BXPS/2;
    end
  end

  function automatic longint lb_out_bx(longint ce);
    longint p;
    if (!lb_clk_inv) p = 12500 + ((ce - 12500) / BXPS + 1) * BXPS;
    else             p = (ce / BXPS + 1) * BXPS + 12500;
    return (p - 12500) / BXPS;
  endfunction

  function automatic longint next_close(longint e);
    return 12500 + c_ps + ((e - 12500 - c_ps) / BXPS + 1) * BXPS;
  endfunction

  task automatic lb_pulse(int ch, longint e);
    longint ce, oe, k;
    ce = next_close(e);
    oe = ce - ((modp(c_ps - o_ps, BXPS) == 0) ? BXPS : modp(c_ps - o_ps, BXPS));
    if (e > oe) begin
      k = lb_out_bx(ce) + lb_data_delay;
      if (!lb_exp.exists(k)) lb_exp[k] = '0;
      lb_exp[k][ch] = 1'b1;
      m_accept++;
      if (lb_clk_inv) m_clkinv_hits++;
    end else m_reject++;
    fork
      begin
        #((e / 1000.0) - $realtime) lb_strip_i[ch] = 1'b1;
        #100 lb_strip_i[ch] = 1'b0;
      end
    join_none
  endtask

  always @(posedge lb_clk40) begin
    longint k, bexp;
    logic [NCH-1:0] e;
    k = (longint'($realtime * 1000.0 + 0.5) - 12500) / BXPS;
    #1;
    lb_rec[int'(lb_bcn_o)] = {lb_hit_o, lb_bcn_o, lb_bc0_o};
    if (lb_check) begin
      e = lb_exp.exists(k) ? lb_exp[k] : '0;
      checks++;
      if (lb_hit_o !== e) fail($sformatf("LB hits at bx %0d: %h exp %h", k, lb_hit_o, e));
      if (lb_kb >= 0 && k > lb_kb + lb_bc0_delay) begin
        // BCN = 0 on the edge after the delayed BC0
        bexp = modp(k - (lb_kb + lb_bc0_delay + 1), 3564);
        checks++;
        if (lb_bcn_o !== 12'(bexp)) fail($sformatf("LB bcn %0d exp %0d", lb_bcn_o, bexp));
        if (lb_bc0_o) begin
          if (bexp == 0) m_bc0_align++;
          else fail("LB bc0 misplaced");
        end
      end
    end
  end

  logic [11:0] lb_diag_last;

  task automatic lb_run(longint o, longint c, bit inv, longint t_start);
    longint ce0;
    lb_rst_n = 0; lb_check = 0;
    lb_exp.delete(); lb_kb = -1;
    o_ps = o; c_ps = c; lb_clk_inv = inv;
    #100 lb_rst_n = 1;
    #100 lb_check = 1;
    // TTC BC0, raised 250 ps after a window-closed edge for one period
    ce0 = next_close(longint'($realtime * 1000.0));
    #((ce0 + 250) / 1000.0 - $realtime) lb_bc0_i = 1;
    lb_kb = lb_out_bx(ce0 + BXPS);
    #25 lb_bc0_i = 0;
    lb_rec.delete();
    fork
      begin
        #2000;
        @(posedge lb_clk40); #2 lb_diag_start_i = 1;
        @(posedge lb_clk40); #2 lb_diag_start_i = 0;
      end
    join_none
    for (int r = 0; r < 60; r++) begin
      longint t0;
      t0 = longint'($realtime * 1000.0 + 0.5);
      for (int ch = 0; ch < NCH; ch++)
        if (($urandom % 4) == 0) lb_pulse(ch, t0 + 100 * longint'($urandom % 32'd250) + 50);
      #200;
    end
    #300;
    lb_check = 0;
    // read the diagnostic snapshot of the link-board output (256
    // consecutive BX from 2 us after the BC0): every entry must equal what
    // the output showed in that BX
    wait (lb_diag_done_o);
    for (int a = 0; a < 256; a++) begin
      logic [NCH+12:0] v;
      int b;
      lb_diag_rd_addr = 8'(a);
      @(posedge lb_clk40); #2;
      v = lb_diag_rd_data;
      b = int'(v[12:1]);
      checks++;
      if (!lb_rec.exists(b) || lb_rec[b] !== v)
        fail($sformatf("LB snapshot entry %0d (bcn %0d) differs from the output", a, b));
      else if (a > 0 && b != (int'(lb_diag_last) + 1) % 3564)
        fail($sformatf("LB snapshot entry %0d: bcn %0d after %0d", a, b, lb_diag_last));
      else if (a == 255 && v != '0) m_lb_diag++;
      lb_diag_last = 12'(b);
    end
  endtask

  initial begin
    #1000;
    lb_run(5000, 20000, 0, 0);
    lb_bc0_delay = 6'd0; lb_data_delay = 4'd5;
    lb_run(18000, 9000, 1, 0);
  end

  // ======================================================= channel clocks
  localparam real TB = 3.125, TX0 = 10.0, RX0 = 17.3;
  int ftx = 0, frx = 0;

  initial begin
    #(TX0);
    forever begin
      tx_clk_fast = 1;
      if (ftx % M == 0) tx_clk40 = 1;
      if (ftx % M == M/2) tx_clk40 = 0;
      #(TX0 + (ftx + 0.5) * TB - $realtime) tx_clk_fast = 0;
      #(TX0 + (ftx + 1) * TB - $realtime) ftx++;
    end
  end

  initial begin
    #(RX0);
    forever begin
      rx_clk_fast = 1;
      if (frx % M == 0) rx_clk40 = 1;
      if (frx % M == M/2) rx_clk40 = 0;
      #(RX0 + (frx + 0.5) * TB - $realtime) rx_clk_fast = 0;
      #(RX0 + (frx + 1) * TB - $realtime) frx++;
    end
  end

  // ============================================================== medium
  real skew [L] = '{0.4, 3.9, 1.7};
  logic [L-1:0] flip = '0;
  logic [L-1:0] line_d;
  for (genvar l = 0; l < L; l++) begin : g_med
    initial begin
      line_d[l] = 1'b0;
      forever begin
        @(tx_line_o[l]);
        fork
          automatic logic v = tx_line_o[l];
          begin
            #(skew[l]) line_d[l] = v;
          end
        join_none
      end
    end
  end
  assign rx_line_i = line_d ^ flip;

  // ========================================================= TTC BC0 pulses
  // one pulse per orbit, at tx edge 3564*q + 50 and rx edge 3564*q + 50
  always @(negedge tx_clk40) tx_bc0_i <= ((ftx / M) % 3564 == 49);
  always @(negedge rx_clk40) rx_bc0_i <= ((frx / M) % 3564 == 49);

  // =============================================== data source and checker
  logic [D-1:0] by_bcn [0:3563];
  bit data_on = 0, data_check = 0, data_masking = 0;
  logic [D-1:0] pac_hist [3];

  always @(posedge tx_clk40) begin
    // the sender takes tx_data_i with the signature of the BCN before this edge
    by_bcn[tx_bcn_o] = tx_data_i;
    #1;
    if (data_on) for (int i = 0; i < D; i++) tx_data_i[i] = ($urandom % 6) == 0;
    else tx_data_i = '0;
  end

  always @(posedge rx_clk40) begin
    logic [D-1:0] e;
    int b;
    #1;
    b = int'(rx_bcn_o);
    // data_o after edge e: word of tx BCN = rx BCN before e; pac one edge later
    pac_hist[2] = pac_hist[1]; pac_hist[1] = pac_hist[0];
    pac_hist[0] = by_bcn[(b - 2 + 3564) % 3564];
    if (data_check) begin
      e = pac_hist[0];
      if (rx_ext >= 1) e |= pac_hist[1];
      if (rx_ext >= 2) e |= pac_hist[2];
      checks++;
      if (data_masking) begin
        if (pac_hit_o !== e && pac_hit_o !== '0) fail("corrupted word passed");
        if (!rx_valid_o) m_masked++;
      end else begin
        if (pac_hit_o !== e) fail($sformatf("pac %h exp %h (rx bcn %0d)", pac_hit_o, e, b));
        if (rx_valid_o) m_valid++;
        if (rx_ext != 0 && (pac_hit_o & ~pac_hist[0]) != 0) m_ext++;
      end
    end
  end

  // ============================================== channel set-up procedure
  task automatic rx_bx(int n);
    repeat (n) @(posedge rx_clk40);
    #2;
  endtask

  function automatic logic [T-1:0] par(logic [N-1:0] w);
    logic [T-1:0] p = '0;
    for (int i = 0; i < D; i++) p[i % T] ^= w[T + i];
    return p;
  endfunction

  initial begin
    bit found, ok;
    int k_found;
    logic [N-1:0] w_rec [256];
    logic [T-1:0] l_rec [256];

    #3 tx_rst_n = 1; rx_rst_n = 1;
    tx_static_i = {8'h17, 8'h4E, 8'h35};
    tx_cfg = '{timing_en: 0, test_en: 1, random_en: 0, check_en: 0};
    rx_cfg = '{timing_en: 0, check_en: 0, block_en: 0, test_en: 1, random_en: 0};
    rx_bx(10);

    // 1. static, then pseudorandom test over the alignment settings
    found = 0;
    for (int md = 0; md < M && !found; md++)
      for (int ra = 0; ra < 8 && !found; ra++)
        for (int es = 0; es < 8 && !found; es++) begin
          rx_mux_delay = 3'(md); rx_reg_add = 3'(ra); rx_edge_sel = 3'(es);
          tx_cfg.random_en = 0; rx_cfg.random_en = 0;
          rx_bx(6);
          ok = 1;
          for (int n = 0; n < 4; n++) begin
            if (rx_test_o !== tx_static_i) ok = 0;
            rx_bx(1);
          end
          if (!ok) begin m_static_fail++; continue; end
          m_static_pass++;
          tx_cfg.random_en = 1; rx_cfg.random_en = 1;
          rx_bx(6);
          rx_err_clr = 1; rx_bx(1); rx_err_clr = 0;
          rx_bx(100);
          if (rx_err_cnt_o == 0) begin found = 1; m_random_pass++; end
        end
    checks++;
    if (!found) fail("no working alignment setting");
    $display("alignment: muxDelay=%0d regAdd=%b clkInv=%b (static fails %0d, passes %0d)",
             rx_mux_delay, rx_reg_add, rx_edge_sel, m_static_fail, m_static_pass);
    if (rx_reg_add != 0 || rx_edge_sel != 0) m_edge_regadd++;

    // 2. flipped bit during the pseudorandom test
    rx_bx(10);
    #0.7 flip[1] = 1'b1;
    #(TB) flip[1] = 1'b0;
    rx_bx(5);
    checks++;
    if (rx_err_cnt_o == 0) fail("injected error not counted");
    else m_random_err++;
    $display("random test: %0d error BX counted after one flipped bit", rx_err_cnt_o);

    // 3. time signature on; find dataDelay from a diagnostic snapshot
    tx_cfg = '{timing_en: 1, test_en: 0, random_en: 0, check_en: 1};
    rx_cfg = '{timing_en: 1, check_en: 1, block_en: 1, test_en: 0, random_en: 0};
    rx_data_delay = '0;
    wait ((frx / M) > 3564 + 200);           // after the BC0 of the second orbit
    rx_bx(2);
    diag_start_i = 1; rx_bx(1); diag_start_i = 0;
    wait (diag_done_o); rx_bx(1);
    for (int a = 0; a < 256; a++) begin
      diag_rd_addr = 8'(a); rx_bx(1);
      // {word (24), received sig (5), local sig (5), data (19), valid (1)}
      w_rec[a] = diag_rd_data[53:30];
      l_rec[a] = diag_rd_data[24:20];
    end
    k_found = -1;
    for (int k = 0; k < 16 && k_found < 0; k++) begin
      ok = 1;
      for (int i = 20; i < 256; i++)
        if ((w_rec[i-k][T-1:0] ^ par(w_rec[i-k])) != l_rec[i]) ok = 0;
      if (ok) k_found = k;
    end
    checks++;
    if (k_found < 0) fail("no dataDelay found from the diagnostic snapshot");
    else m_diag++;
    $display("dataDelay from diagnostic readout: %0d", k_found);

    // wrong delay: everything blocked
    data_on = 1;
    rx_data_delay = 4'(k_found + 1);
    rx_bx(5);
    for (int n = 0; n < 50; n++) begin
      checks++;
      if (rx_valid_o || pac_hit_o != 0) fail("mismatching signature not blocked");
      else m_block++;
      rx_bx(1);
    end

    // 4. real data at the right delay
    rx_data_delay = 4'(k_found);
    rx_bx(5);
    data_check = 1;
    rx_bx(400);
    rx_ext = 2'd1; rx_bx(300);
    rx_ext = 2'd2; rx_bx(300);
    rx_ext = 2'd0; rx_bx(50);

    // 5. random bit flips on the medium
    data_masking = 1;
    for (int n = 0; n < 200; n++) begin
      #0.7 flip = 3'(1 << ($urandom % 3));
      #(TB) flip = '0;
      rx_bx(1);
    end
    data_masking = 0; data_check = 0;
    rx_bx(5);

    // summary
    $display("LB: accepted %0d rejected %0d (ClkInv %0d) bc0-aligned %0d", m_accept, m_reject, m_clkinv_hits, m_bc0_align);
    $display("channel: static fail %0d pass %0d, random pass %0d err %0d, edge/regAdd %0d, diag %0d",
             m_static_fail, m_static_pass, m_random_pass, m_random_err, m_edge_regadd, m_diag);
    $display("         blocked %0d valid %0d extended %0d masked %0d", m_block, m_valid, m_ext, m_masked);
    $display("LB snapshots checked: %0d", m_lb_diag);
    begin
      int mech [15];
      mech = '{m_accept, m_reject, m_clkinv_hits, m_bc0_align, m_static_fail, m_static_pass,
               m_random_pass, m_random_err, m_edge_regadd, m_diag, m_block, m_valid,
               m_ext, m_masked, m_lb_diag};
      for (int i = 0; i < 15; i++) begin
        checks++;
        if (mech[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Multi-board alignment testbench: four link boards whose TTC clocks arrive
// with different delays (fibres of different length) and whose chambers see
// muon hits at different times must give the hits of one collision the same
// bunch number (BCN).
//
// Each board is a rpc_sync_top (link-board part only, 8 strips; the channel
// part is held in reset). The testbench plays the configuration software:
//  - the board with the longest TTC delay is the reference; the others get
//    the BC0 delay int(dt/25 ns) + (1 if the clock phases differ) with dt the
//    TTC delay difference (no window-dependent term: in this design BC0 and
//    hits share the capture path);
//  - the window opens at (t_min + dphi + offset) mod 25 ns and stays open
//    20 ns; ClkInv is set when the window-closed phase lies in 15..18 ns;
//  - the data delay is a - int((t_min + dphi + offset)/25 ns) + (1 if the
//    phases differ) - (1 if the window wraps past the clock edge), with a
//    the smallest constant that keeps all delays non-negative. This is the
//    rule that holds for this design's capture path.
// Collisions happen every 6 BX. Every board receives hits on a random set of
// strips, spread over 18 ns after its earliest arrival time t_min. The test
// checks that each board delivers every event's hits in one BX, and that
// all boards label an event with the same BCN, which must advance exactly
// with the collision BX. A second run with all delays at zero must show
// boards that disagree (the alignment is needed), and a third run with a
// wrong offset guess, on one board, spreads hits over two BX; the offset
// correction computed from the hit counts in the two BX (the fraction in
// the later BX times 25 ns) must then bring them back into one BX.
`timescale 1ns/1ps
module tb_lb_alignment;
  import rpc_sync_pkg::*;
  localparam int NLB = 4, NCH = 8, NEV = 40;
  localparam longint BXPS = 25000;
  localparam longint B0 = 20;              // collision BX of the TTC BC0

  // TTC propagation delay and minimal hit arrival time of each board (ps)
  longint t_ttc [NLB] = '{400000, 337300, 212800, 300000};
  longint t_min [NLB] = '{90000, 160000, 120300, 133700};
  longint offset = 3000;                   // true offset (see below)
  longint off_guess [NLB];                 // offset used for the settings
  longint win = 20000;                     // window width, ps
  longint base;                            // collision BX where a run starts

  // ---------------------------------------------------------------- DUTs
  logic [NLB-1:0] clk40 = '0, clk_open = '0, clk_close = '0, bc0 = '0, clk_inv = '0;
  logic rst_n = 0;
  logic [5:0] bc0_delay [NLB];
  logic [3:0] data_delay [NLB];
  logic [NCH-1:0] strip [NLB];
  logic [NCH-1:0] hit [NLB];
  logic [11:0] bcn [NLB];
  logic [NLB-1:0] bc0_o;
  longint o_ps [NLB], c_ps [NLB];

  for (genvar i = 0; i < NLB; i++) begin : g_lb
    logic [2:0]  u_line;
    logic [11:0] u_txbcn, u_rxbcn;
    logic [18:0] u_pac;
    logic        u_valid, u_busy, u_done;
    logic [23:0] u_test;
    logic [2:0]  u_lerr;
    logic [31:0] u_cnt;
    logic [53:0] u_diag;
    logic [NCH+12:0] u_lbdiag;
    logic        u_lbbusy, u_lbdone;
    rpc_sync_top #(.NCH(NCH)) u_lb (
      .lb_clk40(clk40[i]), .lb_clk_open(clk_open[i]), .lb_clk_close(clk_close[i]),
      .lb_rst_n(rst_n), .lb_clk_inv(clk_inv[i]), .lb_bc0_delay(bc0_delay[i]),
      .lb_data_delay(data_delay[i]), .lb_strip_i(strip[i]), .lb_bc0_i(bc0[i]),
      .lb_hit_o(hit[i]), .lb_bcn_o(bcn[i]), .lb_bc0_o(bc0_o[i]),
      .lb_diag_start_i(1'b0), .lb_diag_rd_addr(8'd0), .lb_diag_rd_data(u_lbdiag),
      .lb_diag_busy_o(u_lbbusy), .lb_diag_done_o(u_lbdone),
      .tx_clk40(1'b0), .tx_clk_fast(1'b0), .tx_rst_n(1'b0), .tx_bc0_i(1'b0),
      .tx_bc0_delay(6'd0), .tx_cfg('0), .tx_data_i('0), .tx_static_i('0),
      .tx_line_o(u_line), .tx_bcn_o(u_txbcn),
      .rx_clk40(1'b0), .rx_clk_fast(1'b0), .rx_rst_n(1'b0), .rx_bc0_i(1'b0),
      .rx_bc0_delay(6'd0), .rx_line_i(3'd0), .rx_edge_sel(3'd0), .rx_reg_add(3'd0),
      .rx_mux_delay(3'd0), .rx_data_delay(4'd0), .rx_cfg('0), .rx_ext(2'd0),
      .rx_err_clr(1'b0), .pac_hit_o(u_pac), .rx_valid_o(u_valid), .rx_test_o(u_test),
      .rx_line_err_o(u_lerr), .rx_err_cnt_o(u_cnt), .rx_bcn_o(u_rxbcn),
      .diag_start_i(1'b0), .diag_rd_addr(8'd0), .diag_rd_data(u_diag),
      .diag_busy_o(u_busy), .diag_done_o(u_done));
  end

  int checks = 0, failures = 0;
  int m_aligned = 0, m_misaligned = 0, m_clkinv = 0, m_wrap = 0, m_split = 0, m_corrected = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
  endtask

  function automatic longint modp(longint a, longint m);
    longint r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic longint now_ps();
    return longint'($realtime * 1000.0 + 0.5);
  endfunction

  // Board i: clk40 rises at k*25 ns + t_ttc[i]; the window clocks o_ps/c_ps later.
  initial forever begin
    #0.1;
    begin
      longint t;
      t = now_ps();
      for (int i = 0; i < NLB; i++) begin
        clk40[i]     = modp(t - t_ttc[i], BXPS) < BXPS/2;
        clk_open[i]  = modp(t - t_ttc[i] - o_ps[i], BXPS) < BXPS/2;
        clk_close[i] = modp(t - t_ttc[i] - c_ps[i], BXPS) < BXPS/2;
      end
    end
  end

  // ------------------------------------------------------- configuration
  task automatic configure(bit use_delays);
    longint tr, dt, dphi, y, q, s, w, dd [NLB], a;
    tr = 0;
    for (int i = 0; i < NLB; i++) if (t_ttc[i] > tr) tr = t_ttc[i];
    a = 0;
    for (int i = 0; i < NLB; i++) begin
      dt = tr - t_ttc[i];
      dphi = dt % BXPS;
      s = (dphi > 0) ? 1 : 0;
      y = t_min[i] + dphi + off_guess[i];
      q = y / BXPS;
      o_ps[i] = y % BXPS;
      c_ps[i] = (o_ps[i] + win) % BXPS;
      w = (c_ps[i] < o_ps[i]) ? 1 : 0;
      clk_inv[i] = (c_ps[i] >= 15000 && c_ps[i] <= 18000);
      if (clk_inv[i]) m_clkinv++;
      if (w != 0) m_wrap++;
      bc0_delay[i] = use_delays ? 6'(dt / BXPS + s) : 6'd0;
      dd[i] = -q + s - w;
      if (-dd[i] > a) a = -dd[i];
    end
    for (int i = 0; i < NLB; i++) data_delay[i] = use_delays ? 4'(a + dd[i]) : 4'd0;
  endtask

  // ------------------------------------------------------------- stimulus
  // Hits of one collision on board i arrive from b*25 ns + (offset + t_ref)
  // + t_min[i] on, spread over 18 ns; the true offset is defined relative to
  // the reference board's clock, as the window formula expects.
  logic [NCH-1:0] exp_hits [NLB][NEV];
  longint ev_bx [NEV];

  task automatic pulse(int i, int ch, longint e);
    fork
      begin
        #((e / 1000.0) - $realtime) strip[i][ch] = 1'b1;
        #100 strip[i][ch] = 1'b0;
      end
    join_none
  endtask

  task automatic send_events(longint b_first, longint spread_lo, longint spread_hi);
    longint tr;
    tr = t_ttc[0];
    for (int e = 0; e < NEV; e++) begin
      ev_bx[e] = base + b_first + 6 * e;
      for (int i = 0; i < NLB; i++) begin
        exp_hits[i][e] = NCH'($urandom) | NCH'(1 << ($urandom % NCH));
        for (int ch = 0; ch < NCH; ch++)
          if (exp_hits[i][e][ch])
            pulse(i, ch, ev_bx[e] * BXPS + offset + tr + t_min[i] + spread_lo
                         + longint'($urandom % 32'(spread_hi - spread_lo + 1)));
      end
    end
  endtask

  task automatic send_bc0();
    // BC0 of collision BX B0, synchronous with each board's window-closed clock
    for (int i = 0; i < NLB; i++) begin
      automatic int ii;
      automatic longint tb0;
      ii = i;
      tb0 = (base + B0) * BXPS + t_ttc[i] + c_ps[i] + 250;
      fork
        begin
          #((tb0 / 1000.0) - $realtime) bc0[ii] = 1'b1;
          #25 bc0[ii] = 1'b0;
        end
      join_none
    end
  endtask

  // ------------------------------------------------------------- monitor
  // obs_bcn[i][e] / obs_n[i][e]: BCN and number of BX in which board i
  // delivered hits of event e; obs_hits collects the strips.
  longint obs_bcn [NLB][NEV];
  int obs_n [NLB][NEV];
  logic [NCH-1:0] obs_hits [NLB][NEV];
  int obs_cnt [NLB][NEV][2];
  bit mon_en = 0;

  // Hits of one event reach a board within two BX, and events are 6 BX
  // apart, so each burst of hit BX on a board is the next event.
  int grp [NLB];
  longint last_k [NLB];

  for (genvar i = 0; i < NLB; i++) begin : g_mon
    always @(posedge clk40[i]) begin
      longint k;
      #1;
      if (mon_en && hit[i] != '0) begin
        k = (now_ps() - t_ttc[i]) / BXPS;
        if (grp[i] < 0 || k - last_k[i] > 2) grp[i]++;
        last_k[i] = k;
        if (grp[i] >= NEV) fail($sformatf("board %0d: hits %b after the last event", i, hit[i]));
        else begin
          if (obs_n[i][grp[i]] == 0) obs_bcn[i][grp[i]] = longint'(bcn[i]);
          if (obs_n[i][grp[i]] < 2)
            obs_cnt[i][grp[i]][obs_n[i][grp[i]]] = $countones(hit[i]);
          obs_n[i][grp[i]]++;
          obs_hits[i][grp[i]] |= hit[i];
        end
      end
    end
  end

  task automatic clear_obs();
    for (int i = 0; i < NLB; i++) begin grp[i] = -1; last_k[i] = 0; end
    for (int i = 0; i < NLB; i++)
      for (int e = 0; e < NEV; e++) begin
        obs_n[i][e] = 0; obs_hits[i][e] = '0; obs_bcn[i][e] = 0;
        obs_cnt[i][e][0] = 0; obs_cnt[i][e][1] = 0;
      end
  endtask

  task automatic run(bit use_delays, longint spread_hi);
    rst_n = 0;
    mon_en = 0;
    for (int i = 0; i < NLB; i++) strip[i] = '0;
    configure(use_delays);
    clear_obs();
    #200 rst_n = 1;
    // BC0 and collisions are placed after the present time
    base = now_ps() / BXPS + 4;
    send_bc0();
    send_events(60, 500, spread_hi);
    mon_en = 1;
    #((100 + 6 * NEV) * 25.0);
    mon_en = 0;
  endtask

  // checks of one aligned run: every board, every event in one BX with the
  // right strips; all boards give the same BCN; BCN advances with the BX.
  task automatic check_aligned(string tag);
    longint k0;
    k0 = obs_bcn[0][0] - ev_bx[0];
    for (int e = 0; e < NEV; e++)
      for (int i = 0; i < NLB; i++) begin
        checks++;
        if (obs_n[i][e] != 1 || obs_hits[i][e] != exp_hits[i][e])
          fail($sformatf("%s board %0d event %0d: %0d BX, hits %b exp %b", tag, i, e,
                         obs_n[i][e], obs_hits[i][e], exp_hits[i][e]));
        checks++;
        if (obs_bcn[i][e] != obs_bcn[0][e])
          fail($sformatf("%s event %0d: board %0d BCN %0d, board 0 BCN %0d", tag, e, i,
                         obs_bcn[i][e], obs_bcn[0][e]));
        else if (i == NLB - 1) m_aligned++;
        checks++;
        if (obs_bcn[i][e] - ev_bx[e] != k0)
          fail($sformatf("%s event %0d board %0d: BCN %0d does not follow the BX", tag, e, i,
                         obs_bcn[i][e]));
      end
  endtask

  initial begin
    for (int i = 0; i < NLB; i++) begin
      grp[i] = -1; last_k[i] = 0;
      strip[i] = '0; bc0_delay[i] = '0; data_delay[i] = '0; off_guess[i] = offset;
      o_ps[i] = 0; c_ps[i] = 12500;
    end
    #100;

    // 1. settings from the formulas: all boards agree
    run(1, 18000);
    check_aligned("aligned");
    $display("aligned run: BC0 delays %0d %0d %0d %0d, data delays %0d %0d %0d %0d",
             bc0_delay[0], bc0_delay[1], bc0_delay[2], bc0_delay[3],
             data_delay[0], data_delay[1], data_delay[2], data_delay[3]);

    // 2. no BC0 or data delay: the boards disagree on at least one event
    run(0, 18000);
    for (int e = 0; e < NEV; e++)
      for (int i = 1; i < NLB; i++)
        if (obs_n[i][e] != 0 && obs_bcn[i][e] != obs_bcn[0][e]) m_misaligned++;

    // 3. offset correction. Narrow hit timing (5.5 ns), 24.9 ns windows; the
    //    offset guessed for board 2 is 3 ns too late, so its window opens in
    //    the middle of the hits. The other boards give the proper BX of each
    //    event (as the known beam structure would). Hits of board 2 in the BX
    //    before or after it move the guess by their fraction of 25 ns; repeat
    //    until no hit leaves the proper BX.
    win = 24900;
    off_guess[2] = offset + 3000;
    for (int it = 0; it < 6; it++) begin
      int n_in, n_early, n_late;
      longint ref_bcn, b1;
      run(1, 6000);
      n_in = 0; n_early = 0; n_late = 0;
      for (int e = 0; e < NEV; e++) begin
        ref_bcn = obs_bcn[0][e];
        if (obs_n[2][e] > 1) m_split++;
        for (int x = 0; x < 2 && x < obs_n[2][e]; x++) begin
          b1 = obs_bcn[2][e] + x;
          if (b1 == ref_bcn) n_in += obs_cnt[2][e][x];
          else if (b1 < ref_bcn) n_early += obs_cnt[2][e][x];
          else n_late += obs_cnt[2][e][x];
        end
      end
      $display("offset iteration %0d: guess %0d ps, hits early %0d, proper %0d, late %0d",
               it, off_guess[2], n_early, n_in, n_late);
      if (n_early == 0 && n_late == 0) break;
      off_guess[2] += (longint'(n_late - n_early) * BXPS) / longint'(n_in + n_early + n_late);
    end
    m_corrected = m_aligned;
    check_aligned("corrected");
    m_corrected = m_aligned - m_corrected;

    begin
      string names [6];
      int cnt [6];
      names = '{"aligned events", "misaligned without delays", "ClkInv boards",
                "wrapped windows", "split by wrong offset", "aligned after correction"};
      cnt = '{m_aligned, m_misaligned, m_clkinv, m_wrap, m_split, m_corrected};
      for (int m = 0; m < 6; m++) begin
        $display("mechanism %-28s %0d", names[m], cnt[m]);
        checks++;
        if (cnt[m] == 0) fail($sformatf("mechanism never happened: %s", names[m]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

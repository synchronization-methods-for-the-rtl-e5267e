// Channel-alignment testbench: three OPTO-to-PAC channels from one
// transmitting device to one receiving device, whose media have different
// latencies (0, 1.3 and 31 ns, the last more than one BX longer, plus a
// different skew on every line), must deliver the data of one transmitter BX
// to the receiver in the same BX.
//
// Each channel is the transmission part of a rpc_sync_top (default sizes:
// D = 19, T = 5, M = 8, three lines); the link-board part is idle. All
// transmitters share one clock and BC0, and all receivers share another, so
// all channels carry and compare the same time signatures. For every channel
// independently the testbench:
//  1. searches clkInv / regAdd / muxDelay with the static test word, and
//     confirms a candidate with the pseudorandom test (zero counted errors);
//  2. switches the time signature and its coding on and steps dataDelay from
//     0 until the receiver's signature check marks every word valid;
// then switches on validation and checks that every channel delivers, in
// each receiver BX, the data that channel's transmitter sent in the same
// transmitter BX (same BCN relation for all channels), and that the
// channels did need different dataDelay values (the same delay everywhere
// leaves at least one channel invalid and blocked).
`timescale 1ns/1ps
module tb_channel_alignment;
  import rpc_sync_pkg::*;
  localparam int NC = 3, D = 19, T = 5, M = 8, N = 24, L = 3;
  localparam real TB = 3.125, TX0 = 10.0, RX0 = 17.3;

  logic tx_clk40 = 0, tx_clk_fast = 0, tx_rst_n = 0, tx_bc0_i = 0;
  logic rx_clk40 = 0, rx_clk_fast = 0, rx_rst_n = 0, rx_bc0_i = 0;

  tx_cfg_t        tx_cfg [NC];
  logic [D-1:0]   tx_data [NC];
  logic [N-1:0]   tx_static [NC];
  logic [L-1:0]   tx_line [NC];
  logic [11:0]    tx_bcn [NC];
  logic [L-1:0]   rx_line [NC], rx_edge_sel [NC], rx_reg_add [NC];
  logic [2:0]     rx_mux_delay [NC];
  logic [3:0]     rx_data_delay [NC];
  rx_cfg_t        rx_cfg [NC];
  logic           rx_err_clr [NC];
  logic [D-1:0]   pac [NC];
  logic [NC-1:0]  valid;
  logic [N-1:0]   rx_test [NC];
  logic [31:0]    err_cnt [NC];
  logic [11:0]    rx_bcn [NC];

  for (genvar c = 0; c < NC; c++) begin : g_ch
    logic [95:0] u_hit;
    logic [11:0] u_lbcn;
    logic        u_lbc0, u_busy, u_done;
    logic [2:0]  u_lerr;
    logic [53:0] u_diag;
    logic [108:0] u_lbdiag;
    logic        u_lbbusy, u_lbdone;
    rpc_sync_top u_ch (
      .lb_clk40(1'b0), .lb_clk_open(1'b0), .lb_clk_close(1'b0), .lb_rst_n(1'b0),
      .lb_clk_inv(1'b0), .lb_bc0_delay(6'd0), .lb_data_delay(4'd0), .lb_strip_i('0),
      .lb_bc0_i(1'b0), .lb_hit_o(u_hit), .lb_bcn_o(u_lbcn), .lb_bc0_o(u_lbc0),
      .lb_diag_start_i(1'b0), .lb_diag_rd_addr(8'd0), .lb_diag_rd_data(u_lbdiag),
      .lb_diag_busy_o(u_lbbusy), .lb_diag_done_o(u_lbdone),
      .tx_clk40(tx_clk40), .tx_clk_fast(tx_clk_fast), .tx_rst_n(tx_rst_n),
      .tx_bc0_i(tx_bc0_i), .tx_bc0_delay(6'd0), .tx_cfg(tx_cfg[c]), .tx_data_i(tx_data[c]),
      .tx_static_i(tx_static[c]), .tx_line_o(tx_line[c]), .tx_bcn_o(tx_bcn[c]),
      .rx_clk40(rx_clk40), .rx_clk_fast(rx_clk_fast), .rx_rst_n(rx_rst_n),
      .rx_bc0_i(rx_bc0_i), .rx_bc0_delay(6'd10), .rx_line_i(rx_line[c]),
      .rx_edge_sel(rx_edge_sel[c]), .rx_reg_add(rx_reg_add[c]), .rx_mux_delay(rx_mux_delay[c]),
      .rx_data_delay(rx_data_delay[c]), .rx_cfg(rx_cfg[c]), .rx_ext(2'd0),
      .rx_err_clr(rx_err_clr[c]), .pac_hit_o(pac[c]), .rx_valid_o(valid[c]),
      .rx_test_o(rx_test[c]), .rx_line_err_o(u_lerr), .rx_err_cnt_o(err_cnt[c]),
      .rx_bcn_o(rx_bcn[c]), .diag_start_i(1'b0), .diag_rd_addr(8'd0),
      .diag_rd_data(u_diag), .diag_busy_o(u_busy), .diag_done_o(u_done));
  end

  int checks = 0, failures = 0;
  int m_static_pass = 0, m_random_pass = 0, m_valid_found = 0, m_distinct = 0;
  int m_blocked = 0, m_aligned = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ------------------------------------------------------------- clocks
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
  always @(negedge tx_clk40) tx_bc0_i <= ((ftx / M) % 3564 == 49);
  always @(negedge rx_clk40) rx_bc0_i <= ((frx / M) % 3564 == 49);

  // ------------------------------------------------------------- media
  real lat [NC] = '{0.0, 1.3, 31.0};
  real skew [NC][L] = '{'{0.4, 3.9, 1.7}, '{2.6, 0.2, 1.1}, '{1.4, 2.2, 3.5}};
  for (genvar c = 0; c < NC; c++) begin : g_med
    for (genvar l = 0; l < L; l++) begin : g_line
      initial begin
        rx_line[c][l] = 1'b0;
        forever begin
          @(tx_line[c][l]);
          fork
            automatic logic v = tx_line[c][l];
            begin
              #(lat[c] + skew[c][l]) rx_line[c][l] = v;
            end
          join_none
        end
      end
    end
  end

  // --------------------------------------------------- data and checker
  logic [D-1:0] by_bcn [NC][0:3563];
  bit data_check = 0;

  for (genvar c = 0; c < NC; c++) begin : g_chk
    always @(posedge tx_clk40) begin
      by_bcn[c][tx_bcn[c]] = tx_data[c];
      #1;
      tx_data[c] = D'($urandom);
    end
    always @(posedge rx_clk40) begin
      int b;
      #1;
      b = int'(rx_bcn[c]);
      if (data_check) begin
        // the word sent with transmitter BCN n leaves the PAC input when the
        // receiver BCN is n + 2, on every channel
        checks++;
        if (pac[c] !== by_bcn[c][(b - 2 + 3564) % 3564] || !valid[c])
          fail($sformatf("channel %0d: pac %h exp %h valid %b (rx bcn %0d)", c, pac[c],
                         by_bcn[c][(b - 2 + 3564) % 3564], valid[c], b));
        else if (c == 0) m_aligned++;
      end
    end
  end

  task automatic rx_bx(int n);
    repeat (n) @(posedge rx_clk40);
    #2;
  endtask

  // ----------------------------------------------- per-channel set-up
  task automatic setup(int c);
    bit found, ok;
    tx_static[c] = {8'h17 ^ 8'(c), 8'h4E, 8'h35 + 8'(c)};
    tx_cfg[c] = '{timing_en: 0, test_en: 1, random_en: 0, check_en: 0};
    rx_cfg[c] = '{timing_en: 0, check_en: 0, block_en: 0, test_en: 1, random_en: 0};
    found = 0;
    for (int md = 0; md < M && !found; md++)
      for (int ra = 0; ra < 8 && !found; ra++)
        for (int es = 0; es < 8 && !found; es++) begin
          rx_mux_delay[c] = 3'(md); rx_reg_add[c] = 3'(ra); rx_edge_sel[c] = 3'(es);
          tx_cfg[c].random_en = 0; rx_cfg[c].random_en = 0;
          rx_bx(6);
          ok = 1;
          for (int n = 0; n < 4; n++) begin
            if (rx_test[c] !== tx_static[c]) ok = 0;
            rx_bx(1);
          end
          if (!ok) continue;
          m_static_pass++;
          tx_cfg[c].random_en = 1; rx_cfg[c].random_en = 1;
          rx_bx(6);
          rx_err_clr[c] = 1; rx_bx(1); rx_err_clr[c] = 0;
          rx_bx(100);
          if (rx_err_cnt_ok(c)) begin found = 1; m_random_pass++; end
        end
    checks++;
    if (!found) fail($sformatf("channel %0d: no working alignment setting", c));

    // time signature on, validation off; step dataDelay until all words valid
    tx_cfg[c] = '{timing_en: 1, test_en: 0, random_en: 0, check_en: 1};
    rx_cfg[c] = '{timing_en: 1, check_en: 1, block_en: 0, test_en: 0, random_en: 0};
    found = 0;
    for (int k = 0; k < 16 && !found; k++) begin
      rx_data_delay[c] = 4'(k);
      rx_bx(4);
      ok = 1;
      for (int n = 0; n < 40; n++) begin
        if (!valid[c]) ok = 0;
        rx_bx(1);
      end
      found = ok;
    end
    checks++;
    if (!found) fail($sformatf("channel %0d: no dataDelay gives valid words", c));
    else m_valid_found++;
    $display("channel %0d: muxDelay=%0d regAdd=%b clkInv=%b dataDelay=%0d", c,
             rx_mux_delay[c], rx_reg_add[c], rx_edge_sel[c], rx_data_delay[c]);
    rx_cfg[c].block_en = 1;
  endtask

  function automatic bit rx_err_cnt_ok(int c);
    return err_cnt[c] == 0;
  endfunction

  initial begin
    logic [3:0] dd [NC];
    for (int c = 0; c < NC; c++) begin
      tx_cfg[c] = '0; rx_cfg[c] = '0; tx_data[c] = '0; tx_static[c] = '0;
      rx_edge_sel[c] = '0; rx_reg_add[c] = '0; rx_mux_delay[c] = '0;
      rx_data_delay[c] = '0; rx_err_clr[c] = 0;
    end
    #3 tx_rst_n = 1; rx_rst_n = 1;
    rx_bx(10);
    // wait for the first BC0 on both sides before the signature is used
    wait ((frx / M) > 100);
    fork
      setup(0);
      setup(1);
      setup(2);
    join
    for (int c = 0; c < NC; c++) dd[c] = rx_data_delay[c];
    checks++;
    if (dd[0] == dd[1] && dd[1] == dd[2]) fail("all channels ended with the same dataDelay");
    else m_distinct++;

    // aligned data on all channels, across an orbit boundary (BC0)
    rx_bx(5);
    data_check = 1;
    rx_bx(300);
    begin
      int orbit_end;
      orbit_end = ((frx / M) / 3564 + 1) * 3564;
      wait ((frx / M) > orbit_end + 100);
    end
    data_check = 0;

    // the same delay on every channel: the others must be blocked
    for (int c = 1; c < NC; c++) rx_data_delay[c] = dd[0];
    rx_bx(5);
    for (int n = 0; n < 50; n++) begin
      for (int c = 1; c < NC; c++)
        if (dd[c] != dd[0]) begin
          checks++;
          if (valid[c] || pac[c] != '0) fail($sformatf("channel %0d not blocked", c));
          else m_blocked++;
        end
      rx_bx(1);
    end

    begin
      string names [6];
      int cnt [6];
      names = '{"static passes", "random passes", "dataDelay found", "distinct delays",
                "aligned BX", "blocked with a common delay"};
      cnt = '{m_static_pass, m_random_pass, m_valid_found, m_distinct, m_aligned, m_blocked};
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
    #2000us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

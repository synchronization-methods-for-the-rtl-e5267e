// RPC trigger synchronization chain: link-board synchronization beside one
// generic synchronous transmission channel.
//
// Two independent parts stand side by side, each with its own clocks:
//
// 1. Link board (lb_*). The synchronization unit quantizes NCH asynchronous
//    strip pulses into bunch crossings using the window between the two
//    deskewed TTC clocks (lb_clk_open, lb_clk_close), and resynchronizes the
//    TTC BC0 (which arrives with the window-closed clock) to lb_clk40. The BC0
//    is then delayed by lb_bc0_delay BX (so that all link boards agree on
//    BX 0 whatever their TTC fibre length) and resets the bunch counter; the
//    hits are delayed by lb_data_delay BX (the data delay of the master link
//    board multiplexer input) so that hits of one event carry the same BCN
//    on every board. A diagnostic readout of its own records the output
//    stream {hits (NCH), BCN (12), BC0} BX by BX, which shows directly in
//    which BX the hits of a board land. The zero-suppression and
//    multiplexing onto the optical link are not part of this design: the
//    aligned hits, BCN and BC0 are outputs.
//
// 2. Transmission channel (tx_*, rx_*), set up as the OPTO-to-PAC link of a
//    trigger board: D = 19 data bits plus a T = 5 bit time signature (BC0 and
//    the four low BCN bits) sent over L = 3 lines at M = 8 bits per BX. Each
//    side has its own delayed BC0 and bunch counter, which provide its time
//    signature. The transmitter (tx_sender + muxer) drives tx_line_o; the
//    medium is outside, and the receiver (demuxer + rx_receiver) takes
//    rx_line_i. The received data pass through the hit extender to the PAC
//    inputs (pac_hit_o). A diagnostic readout records, per receiver BX,
//    {demuxed word (N), received signature (T), local signature (T),
//    output data (D), valid}.
//
// The clk_fast inputs must be M times and phase-locked to the clk40 inputs
// of the same side; lb_clk_open / lb_clk_close are lb_clk40 shifted in phase.
// Resets are asynchronous, active low, one per clock group.
module rpc_sync_top
  import rpc_sync_pkg::*;
#(
  parameter int unsigned NCH    = 96,
  parameter int unsigned D      = 19,
  parameter int unsigned T      = 5,
  parameter int unsigned M      = 8,
  parameter int unsigned S      = 3,
  parameter int unsigned BC0DW  = 6,
  parameter int unsigned DDW    = 4,
  parameter int unsigned DIAGAW = 8,
  localparam int unsigned N     = D + T,
  localparam int unsigned L     = (N + M - 1) / M,
  localparam int unsigned MDW   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned DIAGW = N + 2*T + D + 1,
  localparam int unsigned LBDIAGW = NCH + BCN_W + 1
) (
  // link board
  input  logic              lb_clk40,
  input  logic              lb_clk_open,
  input  logic              lb_clk_close,
  input  logic              lb_rst_n,
  input  logic              lb_clk_inv,
  input  logic [BC0DW-1:0]  lb_bc0_delay,
  input  logic [DDW-1:0]    lb_data_delay,
  input  logic [NCH-1:0]    lb_strip_i,
  input  logic              lb_bc0_i,
  output logic [NCH-1:0]    lb_hit_o,
  output logic [BCN_W-1:0]  lb_bcn_o,
  output logic              lb_bc0_o,
  input  logic              lb_diag_start_i,
  input  logic [DIAGAW-1:0] lb_diag_rd_addr,
  output logic [LBDIAGW-1:0] lb_diag_rd_data,
  output logic              lb_diag_busy_o,
  output logic              lb_diag_done_o,
  // transmitter
  input  logic              tx_clk40,
  input  logic              tx_clk_fast,
  input  logic              tx_rst_n,
  input  logic              tx_bc0_i,
  input  logic [BC0DW-1:0]  tx_bc0_delay,
  input  tx_cfg_t           tx_cfg,
  input  logic [D-1:0]      tx_data_i,
  input  logic [N-1:0]      tx_static_i,
  output logic [L-1:0]      tx_line_o,
  output logic [BCN_W-1:0]  tx_bcn_o,
  // receiver
  input  logic              rx_clk40,
  input  logic              rx_clk_fast,
  input  logic              rx_rst_n,
  input  logic              rx_bc0_i,
  input  logic [BC0DW-1:0]  rx_bc0_delay,
  input  logic [L-1:0]      rx_line_i,
  input  logic [L-1:0]      rx_edge_sel,
  input  logic [L-1:0]      rx_reg_add,
  input  logic [MDW-1:0]    rx_mux_delay,
  input  logic [DDW-1:0]    rx_data_delay,
  input  rx_cfg_t           rx_cfg,
  input  logic [1:0]        rx_ext,
  input  logic              rx_err_clr,
  output logic [D-1:0]      pac_hit_o,
  output logic              rx_valid_o,
  output logic [N-1:0]      rx_test_o,
  output logic [S-1:0]      rx_line_err_o,
  output logic [31:0]       rx_err_cnt_o,
  output logic [BCN_W-1:0]  rx_bcn_o,
  // diagnostic readout (receiver clock)
  input  logic              diag_start_i,
  input  logic [DIAGAW-1:0] diag_rd_addr,
  output logic [DIAGW-1:0]  diag_rd_data,
  output logic              diag_busy_o,
  output logic              diag_done_o
);

  // ---------------------------------------------------------------- link board
  logic [NCH-1:0] lb_hit_q;
  logic           lb_bc0_s, lb_bc0_d;

  sync_unit #(.NCH(NCH)) u_lb_su (
    .clk40(lb_clk40), .clk_open(lb_clk_open), .clk_close(lb_clk_close),
    .rst_n(lb_rst_n), .clk_inv(lb_clk_inv),
    .strip_i(lb_strip_i), .bc0_i(lb_bc0_i), .hit_o(lb_hit_q), .bc0_o(lb_bc0_s)
  );

  pipeline_delay #(.W(1), .DW(BC0DW)) u_lb_bc0_delay (
    .clk(lb_clk40), .rst_n(lb_rst_n), .delay(lb_bc0_delay), .d(lb_bc0_s), .q(lb_bc0_d)
  );

  bx_counter u_lb_cnt (
    .clk(lb_clk40), .rst_n(lb_rst_n), .bc0_i(lb_bc0_d), .bcn_o(lb_bcn_o), .bc0_o(lb_bc0_o)
  );

  pipeline_delay #(.W(NCH), .DW(DDW)) u_lb_data_delay (
    .clk(lb_clk40), .rst_n(lb_rst_n), .delay(lb_data_delay), .d(lb_hit_q), .q(lb_hit_o)
  );

  diag_readout #(.W(LBDIAGW), .AW(DIAGAW)) u_lb_diag (
    .clk(lb_clk40), .rst_n(lb_rst_n), .start_i(lb_diag_start_i),
    .data_i({lb_hit_o, lb_bcn_o, lb_bc0_o}), .rd_addr(lb_diag_rd_addr),
    .rd_data(lb_diag_rd_data), .busy_o(lb_diag_busy_o), .done_o(lb_diag_done_o)
  );

  // --------------------------------------------------------------- transmitter
  logic             tx_bc0_d, tx_bc0_q;
  logic [N-1:0]     tx_word;

  pipeline_delay #(.W(1), .DW(BC0DW)) u_tx_bc0_delay (
    .clk(tx_clk40), .rst_n(tx_rst_n), .delay(tx_bc0_delay), .d(tx_bc0_i), .q(tx_bc0_d)
  );

  bx_counter u_tx_cnt (
    .clk(tx_clk40), .rst_n(tx_rst_n), .bc0_i(tx_bc0_d), .bcn_o(tx_bcn_o), .bc0_o(tx_bc0_q)
  );

  tx_sender #(.D(D), .T(T), .S(S)) u_sender (
    .clk(tx_clk40), .rst_n(tx_rst_n), .cfg(tx_cfg), .data_i(tx_data_i),
    .sig_i({tx_bcn_o[T-2:0], tx_bc0_q}), .static_i(tx_static_i), .word_o(tx_word)
  );

  muxer #(.N(N), .M(M)) u_muxer (
    .clk40(tx_clk40), .clk_fast(tx_clk_fast), .rst_n(tx_rst_n),
    .word_i(tx_word), .line_o(tx_line_o)
  );

  // ------------------------------------------------------------------ receiver
  logic             rx_bc0_d, rx_bc0_q;
  logic [N-1:0]     rx_word;
  logic [T-1:0]     rx_local_sig, rx_local_sig_q, rx_sig;
  logic [D-1:0]     rx_data;

  pipeline_delay #(.W(1), .DW(BC0DW)) u_rx_bc0_delay (
    .clk(rx_clk40), .rst_n(rx_rst_n), .delay(rx_bc0_delay), .d(rx_bc0_i), .q(rx_bc0_d)
  );

  bx_counter u_rx_cnt (
    .clk(rx_clk40), .rst_n(rx_rst_n), .bc0_i(rx_bc0_d), .bcn_o(rx_bcn_o), .bc0_o(rx_bc0_q)
  );

  assign rx_local_sig = {rx_bcn_o[T-2:0], rx_bc0_q};

  demuxer #(.N(N), .M(M)) u_demuxer (
    .clk40(rx_clk40), .clk_fast(rx_clk_fast), .rst_n(rx_rst_n),
    .line_i(rx_line_i), .edge_sel(rx_edge_sel), .reg_add(rx_reg_add),
    .mux_delay(rx_mux_delay), .word_o(rx_word)
  );

  rx_receiver #(.D(D), .T(T), .S(S), .DDW(DDW)) u_receiver (
    .clk(rx_clk40), .rst_n(rx_rst_n), .cfg(rx_cfg), .data_delay(rx_data_delay),
    .word_i(rx_word), .local_sig_i(rx_local_sig), .err_clr_i(rx_err_clr),
    .data_o(rx_data), .valid_o(rx_valid_o), .rx_sig_o(rx_sig), .test_o(rx_test_o),
    .line_err_o(rx_line_err_o), .err_cnt_o(rx_err_cnt_o)
  );

  hit_extender #(.W(D)) u_extender (
    .clk(rx_clk40), .rst_n(rx_rst_n), .ext(rx_ext), .hit_i(rx_data), .hit_o(pac_hit_o)
  );

  // ------------------------------------------------------- diagnostic readout
  logic [N-1:0] rx_word_q;

  always_ff @(posedge rx_clk40 or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      rx_local_sig_q <= '0;
      rx_word_q      <= '0;
    end else begin
      rx_local_sig_q <= rx_local_sig;
      rx_word_q      <= rx_word;
    end
  end

  diag_readout #(.W(DIAGW), .AW(DIAGAW)) u_diag (
    .clk(rx_clk40), .rst_n(rx_rst_n), .start_i(diag_start_i),
    .data_i({rx_word_q, rx_sig, rx_local_sig_q, rx_data, rx_valid_o}),
    .rd_addr(diag_rd_addr), .rd_data(diag_rd_data), .busy_o(diag_busy_o), .done_o(diag_done_o)
  );

endmodule

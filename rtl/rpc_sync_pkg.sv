// Shared constants, configuration types and helper functions of the RPC
// trigger synchronization design.
//
// - BX_PER_ORBIT: number of bunch crossings between two BC0 signals (3564,
//   as in the LHC beam structure). The bunch counter is 12 bits wide.
// - tx_cfg_t / rx_cfg_t: the run-time switches of the transmitter and the
//   receiver of the generic transmission channel (the dashed control inputs
//   of the transmitter and receiver block diagrams).
// - prbs_next(): the rule that gives the next pseudorandom test word from the
//   current one. Because the successor depends only on the current value,
//   the receiver checks a test stream without any common initialisation with
//   the transmitter. The rule is a maximal-length Fibonacci LFSR (taps after
//   Xilinx XAPP052) of width P; the all-zero word, which an LFSR never leaves,
//   is given the successor 1 so that a line stuck at 0 is also detected. The
//   choice of polynomial is this design's own.
// - sig_code(): the coding of the time signature with the data bits. Each
//   signature bit j is XORed with every data bit i for which i mod T == j.
//   Which data bits enter each signature bit is this design's choice.
package rpc_sync_pkg;

  localparam int unsigned BX_PER_ORBIT = 3564;
  localparam int unsigned BCN_W        = 12;

  // Largest widths the helper functions handle.
  localparam int unsigned PRBS_MAX_W = 32;
  localparam int unsigned CODE_MAX_D = 256;
  localparam int unsigned CODE_MAX_T = 16;

  typedef struct packed {
    logic timing_en;  // (1) send the time signature instead of zeros
    logic test_en;    // (4) send test data instead of the data stream
    logic random_en;  // (2) pseudorandom instead of static test data
    logic check_en;   // (5) code the signature with the data bits
  } tx_cfg_t;

  typedef struct packed {
    logic timing_en;  // (10) compare with the local signature instead of zeros
    logic check_en;   // (7) decode the signature coding
    logic block_en;   // (9)/(11) zero the output when the signature mismatches
    logic test_en;    // (9) test mode: the data output is held at zero
    logic random_en;  // (12) show the pseudorandom analysis, not the raw word
  } rx_cfg_t;

  // Feedback taps (bit k set = stage k+1) of a maximal-length LFSR of width w.
  function automatic logic [PRBS_MAX_W-1:0] prbs_taps(input int unsigned w);
    case (w)
      2:  return 32'h0000_0003;
      3:  return 32'h0000_0006;
      4:  return 32'h0000_000C;
      5:  return 32'h0000_0014;
      6:  return 32'h0000_0030;
      7:  return 32'h0000_0060;
      8:  return 32'h0000_00B8;
      9:  return 32'h0000_0110;
      10: return 32'h0000_0240;
      11: return 32'h0000_0500;
      12: return 32'h0000_0829;
      13: return 32'h0000_100D;
      14: return 32'h0000_2015;
      15: return 32'h0000_6000;
      16: return 32'h0000_D008;
      17: return 32'h0001_2000;
      18: return 32'h0002_0400;
      19: return 32'h0004_0023;
      20: return 32'h0009_0000;
      21: return 32'h0014_0000;
      22: return 32'h0030_0000;
      23: return 32'h0042_0000;
      24: return 32'h00E1_0000;
      25: return 32'h0120_0000;
      26: return 32'h0200_0023;
      27: return 32'h0400_0013;
      28: return 32'h0900_0000;
      29: return 32'h1400_0000;
      30: return 32'h2000_0029;
      31: return 32'h4800_0000;
      32: return 32'h8020_0003;
      default: return 32'h0000_0001;  // width 1: toggles
    endcase
  endfunction

  // Successor of a w-bit pseudorandom test word.
  function automatic logic [PRBS_MAX_W-1:0] prbs_next(input logic [PRBS_MAX_W-1:0] cur,
                                                      input int unsigned w);
    logic [PRBS_MAX_W-1:0] mask;
    logic                  fb;
    mask = (w >= PRBS_MAX_W) ? '1 : ((PRBS_MAX_W'(1) << w) - 1'b1);
    if ((cur & mask) == '0) return PRBS_MAX_W'(1);
    if (w == 1) return ~cur & mask;
    fb = ^(cur & prbs_taps(w));
    return ((cur << 1) | PRBS_MAX_W'(fb)) & mask;
  endfunction

  // Parity word XORed onto a t-bit time signature: bit j is the XOR of the
  // data bits i < d with i mod t == j.
  function automatic logic [CODE_MAX_T-1:0] sig_code(input logic [CODE_MAX_D-1:0] data,
                                                     input int unsigned d,
                                                     input int unsigned t);
    logic [CODE_MAX_T-1:0] par;
    par = '0;
    for (int unsigned i = 0; i < CODE_MAX_D; i++)
      if (i < d && t != 0) par[i % t] ^= data[i];
    return par;
  endfunction

endpackage

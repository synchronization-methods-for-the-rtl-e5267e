# Synchronization for the CMS RPC muon trigger

The CMS resistive plate chamber (RPC) trigger looks for muons by forming
coincidences of chamber hits in a pattern comparator (PAC). It runs as a
pipeline clocked at the 40 MHz LHC bunch-crossing rate. Each 25 ns period is
one bunch crossing (BX). A coincidence only forms if every hit of one
collision reaches the PAC in the same clock period. The hits do not arrive
that way on their own:

* Muons of one collision reach chambers between 4 and 13 m from the collision
  point. The front-end cables also differ in length. As a result, hits of one
  event are spread over more than one BX.
* The TTC system distributes the clock and the orbit marker BC0 over fibres
  40 to 80 m long. Each board therefore sees its clock at a different phase,
  and a different number of periods late.
* The data then cross several multiplexed links: optical links into the
  trigger boards, and 320 MHz LVDS lines between chips on a board. Each link
  has its own latency, and no link carries its transmitter's clock.

This RTL implements the two mechanisms that fix this:

1. **Link-board time quantization.** A strip's rising edge is accepted only
   inside a window set by two phase-shifted copies of the clock. The accepted
   hit becomes a pulse of exactly one BX. A programmable BC0 delay and a
   programmable data delay then make hits of one collision carry the same
   bunch number (BCN) on every link board.
2. **A generic synchronous transmission channel.** The transmitter and receiver
   are parameterized. They serialize a D-bit data word plus a T-bit *time
   signature* over L lines at M bits per line per BX. The receiver realigns
   the lines in its own clock domain, delays the word by whole BX until the
   received signature matches its local one, and blocks words whose signature
   does not match. Static and pseudorandom test patterns find the alignment
   settings and measure the error rate per line.

A diagnostic readout snapshot memory and a PAC-input hit extender complete
the chain. The top module, `rpc_sync_top`, places one link board beside one
channel. The channel is set up as the OPTO-to-PAC link of a trigger board:
D = 19 and T = 5 give N = 24 bits on 3 lines at 320 MHz (M = 8).

## Block map

| file | role |
|---|---|
| `rtl/rpc_sync_pkg.sv` | Constants (3564 BX per orbit), configuration structs `tx_cfg_t`/`rx_cfg_t`, the pseudorandom successor rule `prbs_next`, the signature coding `sig_code` |
| `rtl/sync_unit.sv` | Link-board synchronization window for NCH = 96 strips plus BC0, with the ClkInv option |
| `rtl/pipeline_delay.sv` | Run-time selectable delay of 0 .. 2^DW-1 clock periods (BC0 delay, data delay, dataDelay) |
| `rtl/bx_counter.sv` | Bunch counter, reset by the delayed BC0, wraps after 3564 |
| `rtl/tx_sender.sv` | Channel transmitter: signature insertion, test data (static/PRBS), coding |
| `rtl/muxer.sv` | Serializer, N bits onto L lines, M bits per BX |
| `rtl/demuxer.sv` | Deserializer with per-line edge select and extra register, and a common bit delay |
| `rtl/rx_receiver.sv` | Channel receiver: dataDelay, signature decode/compare, blocking, test analysers and error counter |
| `rtl/hit_extender.sv` | Stretches hits by 0, 1 or 2 BX on the PAC inputs |
| `rtl/diag_readout.sv` | One-shot snapshot RAM of 256 BX, readable afterwards |
| `rtl/rpc_sync_top.sv` | Wires both parts together |

## Link board: the synchronization window

`sync_unit` receives three clocks. `clk40` is the main clock.
`clk_open` ("window open") and `clk_close` ("window closed") are copies of it
that the TTC receiver delays by a programmable fraction of a period (steps of
about 104 ps in the real system). Their rising edges bound a window shorter
than 25 ns. All 96 strips share this window.

Each strip is sampled twice: at the open edge and at the following close edge.
A rising edge lies inside the window exactly when the first sample is 0 and
the second is 1. This test works because a front-end pulse lasts about 100 ns,
much longer than the window. The result is held for one `clk_close` period and
taken into the `clk40` domain on the next rising `clk40` edge. So each accepted
hit becomes a pulse exactly one BX long. A hit whose edge falls outside the
window (between close and the next open) is rejected. The width of the window
is therefore a noise filter.

If the close edge falls just before a rising `clk40` edge, that transfer would
violate timing. In the real system this happens for a close phase of about
15-18 ns. Setting `clk_inv` inserts a falling-edge `clk40` latch first, which
moves the capture by half a period.

The TTC BC0 marker arrives synchronous with the window-closed clock. It is
taken through the same two-stage path, so it gets a BX in the same way as
the hits.

### Aligning the boards: BC0 delay and data delay

Each link board has two `pipeline_delay` instances, set per board at run time:

* **BC0 delay** (`lb_bc0_delay`, 0..63 BX). One board with the longest TTC
  fibre is the reference. Every other board delays its BC0 by the whole
  number of BX by which its fibre is shorter. It adds one more BX if its
  clock phase differs from the reference. Afterwards every board's BC0 arrives up to 25 ns
  after the reference board's. The delayed BC0 resets `bx_counter`, so all
  boards agree on which BX carries a given number.
* **Data delay** (`lb_data_delay`, 0..15 BX). It is set to a common constant,
  minus the whole number of BX that the earliest hits of this board's chambers
  take to arrive: time of flight + chamber + front end + cables + phase
  difference + offset. The window open phase is the fractional part of the
  same sum. Hits of one collision then leave every board with the same BCN.

For this RTL, with `dt` the TTC delay difference to the reference, `dphi =
dt mod 25 ns`, `s = 1` if `dphi > 0` (else 0), and `y = t_min + dphi +
offset`, the settings are:

```
window open  = y mod 25 ns          window close = open + width (mod 25 ns)
bc0_delay    = floor(dt / 25 ns) + s
data_delay   = a - floor(y / 25 ns) + s - w
```

Here `w = 1` when the close phase is smaller than the open phase (the window
straddles the board's clock edge), and `a` is the smallest constant that
keeps every data delay non-negative. ClkInv does not enter these sums: BC0
and hits share the capture path, so any extra capture stage shifts both
alike.

The "offset" in those sums is the unknown phase between the collision instant
and the clock. The commissioning procedure is as follows:

1. Set all boards with a guessed offset.
2. Stretch hits on the PAC inputs by one or two BX (`hit_extender`,
   `rx_ext`) so that muons trigger even when their hits straddle two BX.
3. Take data.
4. Compute the correction from the ratio of hits in the expected BX and its
   neighbours. Hits in a neighbouring BX, as a fraction of all hits, times
   25 ns, is how far to move the window toward them. Repeat until no hits
   leave the expected BX.

The window arithmetic belongs to the configuration software, not to this RTL.
The hardware provides the delay taps, the window, ClkInv and the extender.

Latencies: the hit appears on `hit_o` on the first `clk40` edge after the close
edge (with `clk_inv`, the first rising edge after the falling-edge latch). It
then passes through `lb_data_delay` more periods. `bc0_o` is the delayed BC0
registered once, aligned with BCN = 0.

## Transmission channel: word format and signature

The channel moves N = D + T bits per BX. The word is `{data[D-1:0],
signature[T-1:0]}`. The signature is `{BCN[T-2:0], BC0}` from each side's own
bunch counter, so with T = 5 it is BC0 plus the four low BCN bits. Each side
delays its BC0 (`tx_bc0_delay`, `rx_bc0_delay`) so that the receiver's BCN is
ahead of the transmitter's by the intended channel latency. The receiver
delays the incoming words (`rx_data_delay`) until the two signatures agree.
The signature repeats every 16 BX, so it fixes the latency modulo 16 BX. BC0
makes the full orbit unambiguous.

**Coding.** With `check_en`, each signature bit j is XORed with every data bit
i for which `i mod T == j` (`sig_code`). The receiver applies the same XOR
before comparing. As a result, a corrupted data bit also shows up as a
signature mismatch. The signature check therefore doubles as on-line
monitoring of the data bits, at no extra line cost.

**Transmitter** (`tx_sender`), in order:

1. `timing_en` selects the signature or zeros.
2. S generators of P = N/S bits step once per BX.
3. `random_en` picks the generators or the static word `tx_static_i`.
4. The signature is XORed into the T low bits of the test word, so latency can
   still be measured in test mode.
5. `test_en` picks the test word or `{data, signature}`.
6. `check_en` applies the coding.

The word is registered (1 BX).

**Pseudorandom rule.** Each generator is a maximal-length Fibonacci LFSR of
width P (P = 8 here). The all-zero state has the successor 1, so a line stuck
at 0 cannot pass. The next value depends only on the current one. The
receiver therefore checks each slice against the successor of the slice it
received one BX earlier, with no common seed and no start handshake.

## Transmission channel: line alignment in the receiver clock

This is the least obvious part. The receiver has its own `clk40` and
`clk_fast` (8 x 40 MHz from a PLL). The transmitter's clock is not sent.
The receiver must fix two things. First, where in each bit to sample each
line, since the lines have different skews. Second, which 8 consecutive bits
form one word.

`muxer` sends line l = word bits `8l .. 8l+7`, least significant first. A
toggle flip-flop in the `clk40` domain, sampled twice in `clk_fast`, marks the
start of each BX. The load time, and so the latency, are therefore constant.

`demuxer` has four stages for each line:

1. **edge select** (`rx_edge_sel[l]`, "clkInv"): uses a sample taken on the
   falling instead of the rising `clk_fast` edge. This moves the sampling
   point half a bit (1.56 ns) away from an unstable region.
2. **extra register** (`rx_reg_add[l]`, "regAdd"): delays that line by one
   bit. This equalizes skews of more than half a bit between lines.
3. **common bit delay** (`rx_mux_delay`, "muxDelay", 0..7 bits): the same
   for all lines. It shifts the bit streams so that word boundaries coincide
   with the receiver's BX boundary.
4. **deserializer**: a shift register per line. Its last 8 bits are copied to
   a holding register at every receiver BX start (toggle detection, as in the
   muxer), and `clk40` then registers the holding register as the word.

With zero skew and in-phase clocks, muxDelay = 6 aligns the words. The muxer
plus demuxer then take 3 BX.

**Finding the settings.** This procedure is what the full-size testbench
does:

1. Switch the signature off. Send a static test word and try the settings
   (edge select and regAdd per line, muxDelay common). Keep every setting for
   which `rx_test_o` returns the static word, BX after BX. Usually more than
   one setting works.
2. Switch to the pseudorandom test. `rx_line_err_o` flags each line on which
   a slice broke the successor rule, and `rx_err_cnt_o` counts BX with errors.
   If a line shows errors, try that line with another of the settings that
   passed step 1, and repeat.
3. Switch the signature and coding on. From a diagnostic snapshot, find the
   whole-BX delay that makes the received and local signatures agree, and
   set it as `rx_data_delay`. Stepping `rx_data_delay` until `rx_valid_o`
   stays high gives the same answer. `tb_channel_alignment` does it that
   way.
4. Switch validation (`block_en`) on. From then on any BX whose signature
   does not match gives zero data and `valid = 0`, so a corrupted frame never
   reaches the PAC.

## Receiver checks and outputs

`rx_receiver` works in this order:

1. It delays the demuxed word by `dataDelay`.
2. It undoes the coding.
3. It XORs the received signature with the local one (or with zeros when
   `timing_en` is off). A zero result means `valid`.
4. With `block_en`, it zeroes the data when the word is not valid. The data
   are also zero in test mode.
5. In test mode, S = 3 comparators check the 8-bit slices (one per line here).

`rx_test_o` shows either the received static word or the mismatch bits of the
PRBS check. The counter saturates at 2^32-1 and is cleared by `rx_err_clr`.
The receiver output is registered: a word demuxed in BX n is reported in BX
n + dataDelay + 1. `hit_extender` adds one more register.

Because the signature is also XORed into the test word's low bits, the
receiver compares `{data, signature difference}`. With the correct dataDelay,
the test word arrives unchanged.

## Diagnostic readout

`diag_readout` records 256 consecutive receiver BX of this 54-bit word after
a `diag_start_i` pulse: `{demuxed word, received signature, local signature,
output data, valid}`. Software then reads it at leisure
(`diag_rd_addr` → `diag_rd_data`, one clock later). One snapshot shows the
channel latency directly. It also shows the whole-BX offset between the
signatures, which gives the data delay or BC0 delay, and whether words were
blocked.

A second instance sits on the link-board output. It records `{hits, BCN,
BC0}` (109 bits) per BX, started by `lb_diag_start_i` and read through
`lb_diag_rd_addr` → `lb_diag_rd_data`. Its snapshots show in which BCN each
board puts the hits of an event. This is the raw material for per-board
timing histograms and for checking a board's BC0 delay.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NCH` | 96 | strips per synchronization unit |
| `D`, `T` | 19, 5 | data and signature bits per channel word |
| `M` | 8 | bits per line per BX (`clk_fast` = M x 40 MHz) |
| `S` | 3 | number of test generators and analysers; must divide N |
| `BC0DW` | 6 | BC0 delay range 0..63 BX |
| `DDW` | 4 | data delay ranges 0..15 BX |
| `DIAGAW` | 8 | diagnostic depth 256 BX |

`L = ceil(N/M)` lines. If N is not a multiple of M, the last line is padded
with zeros.

## Verification

Every block has a self-checking testbench in `tb/`, with a reference model
written separately from the RTL. Each prints `TB_RESULT checks=<n>
failures=<n>` and stops on a watchdog if it hangs. `tb_rpc_sync_top` runs the
top with all parameters at their defaults:

* **Link-board part:** random strip pulses with random edge times are checked
  against the window. This runs for two window/ClkInv/delay settings. The BCN
  of each hit is compared with the delayed BC0.
* **Channel part:**
  * The receiver clocks are shifted 7.3 ns from the transmitter's, and the
    three lines have skews of 0.4, 3.9 and 1.7 ns.
  * The bench runs the search above (static search, then PRBS), injects a bit
    flip and expects two counted error BX.
  * It reads dataDelay from the diagnostic snapshot and checks that a wrong
    dataDelay blocks every word.
  * It checks the data against a BCN-based rule at extender settings 0, 1 and
    2, and checks that random line flips are masked.
* **Link-board snapshot:** in each link-board run it takes a diagnostic
  snapshot and compares all 256 entries with the output it saw.
* **Mechanism counters:** the bench counts 15 mechanisms (accepted/rejected
  hits, ClkInv captures, BC0 alignment, static/PRBS passes, counted errors,
  blocked words, and so on). A mechanism that never happens is a failure.

`tb_lb_alignment` covers the system-level case the link-board part exists
for. It uses four `rpc_sync_top` instances with 8 strips each:
* The boards have TTC delays of 400, 337.3, 212.8 and 300 ns, and earliest
  hit times of 90 to 160 ns.
* The bench sets each board with the rules above and sends 40 collisions,
  6 BX apart, with random strips.
* Every board must deliver each event in one BX with the same BCN, and the
  BCN must advance with the collision BX.
* With all delays at zero, the boards must disagree.
* A board set 3 ns off in offset must split its hits over two BX. The
  offset correction must then bring them back into one BX.

`tb_channel_alignment` runs three channels from one transmitting device to
one receiving device:
* The three media are 0, 1.3 and 31 ns long, and each line has its own skew.
* Each channel is set up on its own: static and PRBS search, then dataDelay
  stepped until the signature check marks every word valid.
* Every channel must then deliver the data of one transmitter BX in the same
  receiver BX, also across an orbit boundary.
* The channels end with different dataDelay values. The longest medium also
  moves to a different muxDelay, so its dataDelay comes out smaller. Forcing
  one common dataDelay must leave the other channels blocked.

Simulation with Verilator 5 (two-state, `--timing` for the clock
generators), from the repository root:

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rpc_sync_pkg.sv tb/tb_rpc_sync_top.sv \
    --top-module tb_rpc_sync_top -o sim
./obj_dir/sim
```

Replace `tb_rpc_sync_top` with any other `tb_<block>` to run that block's
bench. The full-size run takes a few seconds. To change the channel geometry,
override `D`, `T`, `M` and `S` on `rpc_sync_top`. S must divide D + T, and
the testbench's search assumes L lines.

## Departures from the original system and open points

* **Window-dependent BC0 term.** In the original system the BC0 needs one
  extra BX when the close edge is early and ClkInv is off. That comes from the
  original FPGA's capture path and is not reproduced here. In this design,
  hits and BC0 share the capture path, so that term drops out. The phase and
  window-wrap terms of the data delay (`+ s - w` above) are what make this
  RTL's boards agree. They differ from the original system's published rule,
  which belongs to its own capture path. `tb_lb_alignment` checks the rule
  given here.
* **Zero suppression, slave/master link board multiplexing, and the 1.6 Gb/s
  optical serializer** sit between the link board and the trigger board. They
  are not part of this RTL: the link-board part ends at the aligned hits, BCN
  and BC0.
* **Only one channel is instantiated.** A PAC receives 18 channels (432 bits
  per BX). The top instantiates one, and the modules are meant to be
  replicated per link.
* **Hit extender position.** The hit extender acts on the 19 received data
  bits of the one channel. In the real PAC it acts on every chamber input.
* **Own choices.** These are this design's own choices:
  * the bit order and BX-start detection of the muxer/demuxer;
  * the exact coding bit selection;
  * the LFSR polynomials and the all-zero rule;
  * the counter width;
  * a single regAdd register per line (one bit of extra delay);
  * the snapshot style of the diagnostic readout (the original unit does much
    more);
  * the ranges of the delays.
* **Not modelled:** the TTC receiver chip, the PLLs and clock deskew, the
  transmission media, the front-end boards, the PAC and ghost-buster logic,
  and the software that automates the search. The testbenches play the role
  of that software and of the media.

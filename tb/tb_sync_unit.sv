// Self-checking testbench of sync_unit (96 strips).
//
// The testbench makes the three clocks itself on a 100 ps grid: clk40
// (rising edges at 12.5 ns + k*25 ns) and the window-open and window-closed
// clocks shifted by o and c. 100 ns strip pulses start at random times off
// that grid, a quarter of the strips in each 200 ns round. For every pulse
// the testbench works out from the edge times alone whether its rising
// edge lies between a window-open edge and the next window-closed edge, and
// on which clk40 rising edge the one-BX output pulse must appear (the first
// after the closing edge, or with clk_inv the first after the first falling
// edge of clk40 that follows it). BC0 pulses, one window-closed period long,
// are checked the same way. Three settings are run: a window inside the
// BX, a window wrapping over the clk40 edge with clk_inv, and a narrow
// window with clk_inv. Accepted and rejected hits are both required to occur.
`timescale 1ns/1ps
module tb_sync_unit;
  localparam int NCH = 96;
  localparam longint BX = 25000;   // ps

  logic clk40 = 0, clk_open = 0, clk_close = 0, rst_n = 0, clk_inv = 0;
  logic [NCH-1:0] strip_i = '0, hit_o;
  logic bc0_i = 0, bc0_o;

  longint o_ps, c_ps;
  longint rise [NCH];
  longint bc0_rise = -1;
  logic [NCH-1:0] exp_hit [longint];
  bit             exp_bc0 [longint];
  bit             check_on = 0;
  int checks = 0, failures = 0, accepted = 0, rejected = 0, bc0_seen = 0, hits_seen = 0;

  sync_unit #(.NCH(NCH)) dut (.*);

  function automatic longint modp(longint a, longint m);
    longint r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic logic phase_hi(longint t, longint off);
    return modp(t - 12500 - off, BX) < BX/2;
  endfunction

  // clk40 rising-edge index at which a signal captured at close edge ce
  // appears on the outputs
  function automatic longint out_bx(longint ce);
    longint p;
    if (!clk_inv) p = 12500 + ((ce - 12500) / BX + 1) * BX;
    else          p = (ce / BX + 1) * BX + 12500;
    return (p - 12500) / BX;
  endfunction

  task automatic new_pulse(int ch, longint e);
    longint ce, oe, k;
    rise[ch] = e;
    ce = 12500 + c_ps + ((e - 12500 - c_ps) / BX + 1) * BX;   // first close edge after e
    oe = ce - ((modp(c_ps - o_ps, BX) == 0) ? BX : modp(c_ps - o_ps, BX));
    if (e > oe) begin
      k = out_bx(ce);
      if (!exp_hit.exists(k)) exp_hit[k] = '0;
      exp_hit[k][ch] = 1'b1;
      accepted++;
    end else rejected++;
  endtask

  task automatic run_setting(longint o, longint c, bit inv, longint t0, longint t1);
    longint t;
    rst_n = 0; check_on = 0;
    o_ps = o; c_ps = c; clk_inv = inv;
    exp_hit.delete(); exp_bc0.delete();
    for (int ch = 0; ch < NCH; ch++) rise[ch] = -1_000_000;
    bc0_rise = -1_000_000;
    for (t = t0; t < t1; t += 50) begin
      #0.05;
      if (t == t0 + 200_000) rst_n = 1;
      if (t == t0 + 400_000) check_on = 1;
      if (modp(t, 100) == 0) begin
        clk40     = phase_hi(t, 0);
        clk_open  = phase_hi(t, o_ps);
        clk_close = phase_hi(t, c_ps);
      end else begin
        // new round every 200 ns, pulses in its first 25 ns
        if (t > t0 + 300_000 && t < t1 - 400_000 && modp(t - t0, 200_000) == 50) begin
          for (int ch = 0; ch < NCH; ch++)
            if (($urandom % 4) == 0) new_pulse(ch, t + 100 * longint'($urandom % 32'd250));
          if (($urandom % 4) == 0) begin
            // BC0 raised 300 ps after a window-closed edge, one period long
            longint ce0 = 12500 + c_ps + ((t - 12500 - c_ps) / BX + 1) * BX;
            bc0_rise = ce0 + 250;
            exp_bc0[out_bx(ce0 + BX)] = 1'b1;
          end
        end
        for (int ch = 0; ch < NCH; ch++) strip_i[ch] = (t >= rise[ch]) && (t < rise[ch] + 100_000);
        bc0_i = (t >= bc0_rise) && (t < bc0_rise + BX);
      end
    end
  endtask

  always @(posedge clk40) begin
    longint k;
    logic [NCH-1:0] e;
    bit eb;
    k = (longint'($realtime * 1000.0 + 0.5) - 12500) / BX;
    #1;
    if (check_on) begin
      e  = exp_hit.exists(k) ? exp_hit[k] : '0;
      eb = exp_bc0.exists(k);
      checks++;
      hits_seen += $countones(hit_o);
      if (bc0_o) bc0_seen++;
      if (hit_o !== e || bc0_o !== eb) begin
        failures++;
        if (failures < 10) $display("bx %0d o=%0d c=%0d inv=%0d: hit %h exp %h bc0 %b exp %b",
                                    k, o_ps, c_ps, clk_inv, hit_o, e, bc0_o, eb);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_setting(5000, 20000, 0, 0, 15_000_000);
    run_setting(20000, 8000, 1, 15_000_000, 30_000_000);
    run_setting(3100, 16300, 1, 30_000_000, 45_000_000);
    check_on = 0;
    checks++;
    if (accepted == 0 || rejected == 0 || bc0_seen == 0 || hits_seen != accepted) failures++;
    $display("accepted=%0d rejected=%0d hits seen=%0d bc0 seen=%0d", accepted, rejected, hits_seen, bc0_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

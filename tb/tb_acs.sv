// tb_acs: self-checking test of the adjacent cell search.
//
// The block is built with a reduced scan (8 phases, sums over 2 symbols of
// 64 chips, frames of 3 symbols). The received samples are a mix of the
// pilot PN at several code offsets plus noise, with random enables and
// invalid samples. After lock and a PN wrap the scan must start, and for
// scan phase p (the local PN held back p chips, one stall chip per frame)
// the reference computes the energy |I|+|Q| over the first two symbols of
// the frame from the stored samples and its own PN sequence. At the end
// the block must report the three largest energies and their phases, in
// order (earlier phase first on ties), and raise rssi_new. A second scan
// is aborted by dropping lock, which must stop the scan without a report.
module tb_acs;
  import demod_pkg::*;
  localparam int NPH = 8, NB = 2, FR = (NB + 1) * 64;
  logic clk = 0, rst_n = 0, en = 0, valid = 0, lock = 0, pn_allones_l = 1;
  sm4_t ion = '0, qon = '0;
  logic [THRA_W-1:0] rssi_e [3];
  logic [14:0] rssi_p [3];
  logic rssi_new, scanning;
  int checks = 0, failures = 0;
  bit pnseq [32768];

  always #1 clk = ~clk;

  acs #(.NPHASE(NPH), .NBLK(NB)) dut (.clk, .rst_n, .en, .ion, .qon, .valid, .lock, .pn_allones_l,
                                      .rssi_e, .rssi_p, .rssi_new, .scanning);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int pm(int idx);
    return pnseq[(idx % 32768 + 32768) % 32768] ? -1 : 1;
  endfunction

  function automatic sm4_t enc(int v);
    if (v > 7) v = 7;
    if (v < -7) v = -7;
    return '{sign: v < 0, mag: 3'(v < 0 ? -v : v)};
  endfunction

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  // samples by enabled-chip index from the scan start
  sm4_t si [int];
  sm4_t sq [int];
  bit   sv [int];

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [15:0] s;
    int t, started, e [NPH], best_e [3], best_p [3];
    int off_a, off_b;
    s = 16'h2A88;
    for (int i = 0; i < 32768; i++) begin
      pnseq[i] = s[0];
      s = {s[15] ^ s[13] ^ s[4] ^ s[0], s[15:1]};
    end
    off_a = 5; off_b = 2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(!scanning, "idle before lock");
    // PN wrap without lock: no scan
    en = 1; pn_allones_l = 0;
    @(negedge clk);
    pn_allones_l = 1;
    repeat (3) @(negedge clk);
    check(!scanning, "no scan without lock");
    lock = 1;
    repeat (5) @(negedge clk);
    check(!scanning, "scan waits for the PN wrap");
    // start
    en = 1; pn_allones_l = 0;
    @(negedge clk);
    pn_allones_l = 1;
    check(scanning, "scan started at the wrap");
    t = 0; started = 0;
    while (!rssi_new) begin
      int vi, vq;
      en = ($urandom_range(0, 3) != 0);
      valid = ($urandom_range(0, 15) != 0);
      // own cell at offset 0, neighbours at off_a (I) and off_b (Q), noise
      vi = 3 * pm(t) + 2 * pm(t - off_a) + int'($urandom_range(0, 2)) - 1;
      vq = 2 * pm(t - off_b) + int'($urandom_range(0, 2)) - 1;
      ion = enc(vi); qon = enc(vq);
      @(posedge clk);
      if (en) begin si[t] = ion; sq[t] = qon; sv[t] = valid; t++; end
      @(negedge clk);
      if (t > NPH * (FR + 1) + 200) break;
    end
    @(negedge clk);
    // reference energies
    for (int p = 0; p < NPH; p++) begin
      e[p] = 0;
      for (int w = 0; w < NB; w++) begin
        int sum_i, sum_q;
        sum_i = 0; sum_q = 0;
        for (int f = w * 64; f < w * 64 + 64; f++) begin
          int c;
          c = p * (FR + 1) + f;
          if (sv[c]) begin
            sum_i += (si[c].sign ? -1 : 1) * int'(si[c].mag) * pm(p * FR + f);
            sum_q += (sq[c].sign ? -1 : 1) * int'(sq[c].mag) * pm(p * FR + f);
          end
        end
        e[p] += iabs(sum_i) + iabs(sum_q);
      end
    end
    for (int k = 0; k < 3; k++) begin best_e[k] = 0; best_p[k] = 0; end
    for (int p = 0; p < NPH; p++) begin
      if (e[p] > best_e[0]) begin
        best_e[2] = best_e[1]; best_p[2] = best_p[1];
        best_e[1] = best_e[0]; best_p[1] = best_p[0];
        best_e[0] = e[p]; best_p[0] = p;
      end else if (e[p] > best_e[1]) begin
        best_e[2] = best_e[1]; best_p[2] = best_p[1];
        best_e[1] = e[p]; best_p[1] = p;
      end else if (e[p] > best_e[2]) begin
        best_e[2] = e[p]; best_p[2] = p;
      end
    end
    $display("energies: %0d %0d %0d %0d %0d %0d %0d %0d", e[0], e[1], e[2], e[3], e[4], e[5], e[6], e[7]);
    check(t <= NPH * (FR + 1) + 2, $sformatf("scan length %0d chips", t));
    for (int k = 0; k < 3; k++)
      check(int'(rssi_e[k]) == best_e[k] && int'(rssi_p[k]) == best_p[k],
            $sformatf("rank %0d: %0d@%0d expected %0d@%0d", k, rssi_e[k], rssi_p[k], best_e[k], best_p[k]));
    check(best_p[0] == 0 && ((best_p[1] == off_a && best_p[2] == off_b) ||
                            (best_p[1] == off_b && best_p[2] == off_a)), "cells found at 0, 5 and 2");
    repeat (3) @(negedge clk);
    check(!scanning, "idle after the report");
    // second scan aborted by loss of lock
    en = 1; pn_allones_l = 0;
    @(negedge clk);
    pn_allones_l = 1;
    check(scanning, "second scan started");
    repeat (300) @(negedge clk);
    lock = 0;
    repeat (3) @(negedge clk);
    check(!scanning, "scan stopped on loss of lock");
    repeat (NPH * (FR + 1)) begin
      @(negedge clk);
      check(!rssi_new, "no report from an aborted scan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

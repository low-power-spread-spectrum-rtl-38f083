// tb_demod_full: full-size end-to-end test of the demodulator.
//
// Same transmitter, channel and checks as tb_demod_top, but the top level is
// built with its default parameters (32768-chip PN, 1088-chip frames,
// 16-symbol pilot sums, a full 32768-phase adjacent cell scan). The
// transmitter starts 42 chips away from the receiver, so the receiver
// first searches for about ten frames before it locks. It then checks decoded
// data, the phase loop moving both ways, register copies at the PN wrap,
// the start of the adjacent cell scan after the wrap, and loss and
// reacquisition of lock. A complete 32768-phase scan (about 36 million
// chips) is beyond a simulation run; the reduced scan is checked to the end
// in tb_demod_top.
module tb_demod_full;
  import demod_pkg::*;

  localparam int K0 = 32768 - 42;

  logic clk = 0, clkrst = 1, rst_n = 0;
  logic [3:0] iin, qin;
  logic [14:0] datain = 0;
  reg_addr_e   addr = REG_WALSH;
  logic csl = 1, wrl = 1;
  logic [2:0] omode = 3'd5;
  logic [27:0] odata;
  logic lock, stall_l, stretchsamp, cmp_adjust, cmp_energy, dumprst, dump64h, dump1024h;
  logic chip_en, clk8;
  logic [1:0] dq_bits;
  logic dq_valid;
  logic [13:0] rssi_e [3];
  logic [14:0] rssi_p [3];
  logic rssi_new;
  logic run = 0, sig_on = 1;
  logic sym_stb;
  logic [1:0] sym_bits;
  int sym_num;

  always #1 clk = ~clk;

  tb_channel #(.K0(K0)) u_ch (
    .clk, .run, .sig_on, .iin, .qin, .sym_stb, .sym_bits, .sym_num);

  demod_top u_dut (
    .clk, .clkrst, .rst_n, .tstmode(TM_NORMAL), .iin, .qin, .iinx(4'd0), .qinx(4'd0),
    .datain, .addr, .csl, .wrl, .omode, .odata, .lock, .stall_l, .stretchsamp,
    .cmp_adjust, .cmp_energy, .dumprst, .dump64h, .dump1024h, .chip_en, .clk8,
    .ec64clk(1'b0), .ecdata(4'd0), .ecpn(1'b0), .ecw(1'b0), .ecdump(1'b0), .ecrstdump(1'b0),
    .dq_bits, .dq_valid, .rssi_e, .rssi_p, .rssi_new);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(reg_addr_e a, logic [14:0] d);
    @(negedge clk); addr = a; datain = d; csl = 0; wrl = 0;
    @(negedge clk); csl = 1; wrl = 1;
  endtask

  // ---- transmitted dibits, by symbol number ----
  logic [1:0] txb [int];
  always @(posedge clk) if (sym_stb) txb[sym_num] = sym_bits;

  // ---- mechanism counters ----
  int n_search = 0, n_lockstall = 0, n_lock = 0, n_lockloss = 0, n_ext = 0, n_red = 0;
  int n_kill = 0, n_wrap = 0, n_acs = 0, n_dq = 0, n_dq_ok = 0, n_stall_chips = 0;
  logic lock_q = 0, srch_q = 0;
  always @(posedge clk) if (rst_n && chip_en) begin
    if (u_dut.stall_search && !srch_q) n_search++;
    srch_q <= u_dut.stall_search;
    if (!stall_l) n_stall_chips++;
    if (u_dut.u_upd.st == 3'd3 && !u_dut.pnstall_l) n_lockstall++;
    if (lock && !lock_q) n_lock++;
    if (!lock && lock_q) n_lockloss++;
    lock_q <= lock;
    if (!u_dut.pn_allones_l) n_wrap++;
  end
  always @(posedge clk) if (rst_n && u_dut.clkx) begin
    if (!u_dut.ext_l) n_ext++;
    if (!u_dut.shr_l) n_red++;
    if (!u_dut.killpulse_l) n_kill++;
  end

  // ---- decoded data: kept by symbol number, scored against the sent
  // dibits at the best fixed lag once the run is over. A decode counts as
  // settled when lock has been held, with the signal on, for the previous
  // three decodes.
  logic [1:0] decs [int];
  int settled = 0;
  always @(posedge clk) if (chip_en) begin
    if (!lock || !sig_on) settled = 0;
    if (dq_valid) begin
      if (settled >= 3) decs[sym_num] = dq_bits;
      settled++;
    end
  end

  task automatic score_data();
    int best = -1, best_m = -1, tot = 0;
    for (int l = 0; l < 6; l++) begin
      int m, t;
      m = 0; t = 0;
      foreach (decs[sn]) if (txb.exists(sn - l)) begin
        t++;
        if (txb[sn - l] == decs[sn]) m++;
      end
      if (m > best_m) begin best_m = m; best = l; tot = t; end
    end
    n_dq = tot; n_dq_ok = best_m;
    $display("decoded data: lag %0d symbols, %0d of %0d correct", best, best_m, tot);
  endtask

  // rate: one decoded dibit per 64 chips while locked
  int last_dq_chip = -1, chip_cnt = 0, rate_bad = 0, rate_n = 0;
  always @(posedge clk) if (chip_en) begin
    chip_cnt++;
    if (dq_valid) begin
      if (last_dq_chip >= 0 && lock_q && lock) begin
        rate_n++;
        if (chip_cnt - last_dq_chip != 64) rate_bad++;
      end
      last_dq_chip = chip_cnt;
    end
  end

  initial begin
    // watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    clkrst = 0;
    wr(REG_WALSH, 15'd5);
    wr(REG_THRA, 15'd2000);
    wr(REG_THRB, 15'd2000);
    wr(REG_THRC, 15'd1000);
    repeat (4) @(posedge clk);
    @(negedge clk); rst_n = 1; run = 1;
    check(u_dut.walshnum == 6'd5 && u_dut.thresa == 14'd2000, "registers loaded during reset");

    wait (lock);
    $display("lock after %0d search frames", n_search);
    // let data flow and the DPLL work for 20 frames
    repeat (20 * 1088 * 4) @(posedge clk);
    score_data();
    check(n_dq > 250, $sformatf("decoded symbols %0d", n_dq));
    check(n_dq_ok == n_dq, $sformatf("decoded %0d symbols, %0d correct", n_dq, n_dq_ok));
    check(rate_n > 100 && rate_bad == 0, $sformatf("symbol rate: %0d intervals, %0d not 64 chips", rate_n, rate_bad));

    // new register value written now must only take effect at a PN wrap
    wr(REG_THRC, 15'd1001);
    repeat (8) @(posedge clk);
    check(u_dut.thresc == 15'd1000 || !u_dut.pn_allones_l, "THRESC back level held until PN wrap");
    wait (!u_dut.pn_allones_l);
    repeat (12) @(posedge clk);
    check(u_dut.thresc == 15'd1001, "THRESC updated at PN wrap");

    // adjacent cell scan starts at the PN wrap
    repeat (8) @(posedge clk);
    check(u_dut.acs_scanning, "adjacent cell scan started at PN wrap");
    if (u_dut.acs_scanning) n_acs++;

    // signal off: lock must drop; back on at the drop: lock must return
    sig_on = 0;
    wait (!lock);
    sig_on = 1;
    wait (lock);
    repeat (4 * 1088 * 4) @(posedge clk);
    check(lock, "lock regained after signal returned");
    score_data();
    check(n_dq_ok == n_dq, "decoded data still correct after reacquisition");

    // ---- mechanisms ----
    $display("search=%0d lockstall=%0d lock=%0d loss=%0d ext=%0d red=%0d kill=%0d wrap=%0d acs=%0d dq=%0d/%0d",
             n_search, n_lockstall, n_lock, n_lockloss, n_ext, n_red, n_kill, n_wrap, n_acs, n_dq_ok, n_dq);
    check(n_search > 0, "search stall happened");
    check(n_lockstall > 0, "lock alignment stall happened");
    check(n_lock >= 2, "lock acquired twice");
    check(n_lockloss >= 1, "lock lost once");
    check(n_ext > 0, "phase extend happened");
    check(n_red > 0, "phase reduce happened");
    check(n_kill == n_red, "one correlator edge removed per reduce");
    check(n_wrap > 0, "PN wrap happened");
    check(n_acs > 0, "adjacent cell scan started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

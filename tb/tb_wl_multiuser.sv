// tb_wl_multiuser: workload test with several users in the cell.
//
// The base station sends the pilot, the wanted user on Walsh code 5 and four
// more users of half the wanted amplitude on Walsh codes 12, 19, 26 and 33,
// each with its own random symbols. The 4-bit ADC model clips the sum when
// the users line up. The test checks that the receiver still locks, decodes
// the wanted user's dibits exactly at one per 64 chips, and that the other
// users' channels cancel in the pilot correlators (lock is held throughout).
module tb_wl_multiuser;
  import demod_pkg::*;

  localparam int K0 = 32768 - 20;

  logic clk = 0, clkrst = 1, rst_n = 0;
  logic [3:0] iin, qin;
  logic [14:0] datain = 0;
  reg_addr_e   addr = REG_WALSH;
  logic csl = 1, wrl = 1;
  logic [27:0] odata;
  logic lock, stall_l, stretchsamp, cmp_adjust, cmp_energy, dumprst, dump64h, dump1024h;
  logic chip_en, clk8;
  logic [1:0] dq_bits;
  logic dq_valid;
  logic [13:0] rssi_e [3];
  logic [14:0] rssi_p [3];
  logic rssi_new;
  logic run = 0;
  logic sym_stb;
  logic [1:0] sym_bits;
  int sym_num;

  always #1 clk = ~clk;

  tb_channel #(.K0(K0), .WALSH(5), .AP(3), .AU(2), .ANB(0), .NOTHER(4), .AO(1)) u_ch (
    .clk, .run, .sig_on(1'b1), .iin, .qin, .sym_stb, .sym_bits, .sym_num);

  demod_top #(.ACS_NPHASE(8), .ACS_NBLK(1)) u_dut (
    .clk, .clkrst, .rst_n, .tstmode(TM_NORMAL), .iin, .qin, .iinx(4'd0), .qinx(4'd0),
    .datain, .addr, .csl, .wrl, .omode(3'd0), .odata, .lock, .stall_l, .stretchsamp,
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

  logic [1:0] txb [int];
  always @(posedge clk) if (sym_stb) txb[sym_num] = sym_bits;

  // decodes after lock has been held for three decodes, by symbol number
  logic [1:0] decs [int];
  int settled = 0, n_lockloss = 0, n_dq = 0, n_dq_ok = 0;
  int last_dq_chip = -1, chip_cnt = 0, rate_bad = 0, rate_n = 0;
  logic lock_q = 0;
  always @(posedge clk) if (rst_n && chip_en) begin
    chip_cnt++;
    if (!lock) settled = 0;
    if (!lock && lock_q) begin n_lockloss++; $display("lock lost at chip %0d", chip_cnt); end
    if (lock && !lock_q) $display("lock at chip %0d", chip_cnt);
    lock_q <= lock;
    if (dq_valid) begin
      if (settled >= 3) decs[sym_num] = dq_bits;
      settled++;
      if (last_dq_chip >= 0 && lock_q && lock) begin
        rate_n++;
        if (chip_cnt - last_dq_chip != 64) rate_bad++;
      end
      last_dq_chip = chip_cnt;
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

  initial begin
    repeat (2_000_000) @(posedge clk);
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

    wait (lock);
    check(1'b1, "lock found with five users in the cell");
    repeat (24 * 1088 * 4) @(posedge clk);
    score_data();
    check(n_dq > 300, $sformatf("decoded symbols %0d", n_dq));
    check(n_dq_ok == n_dq, $sformatf("wanted user: %0d symbols, %0d correct", n_dq, n_dq_ok));
    check(rate_n > 300 && rate_bad == 0, $sformatf("symbol rate: %0d intervals, %0d not 64 chips", rate_n, rate_bad));
    check(n_lockloss == 0, $sformatf("lock held, %0d losses", n_lockloss));
    check(lock, "still locked at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

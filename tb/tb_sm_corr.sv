// tb_sm_corr: self-checking test of the sign-magnitude carry-save correlator.
//
// Two instances are driven with random sign-magnitude samples, PN and Walsh
// chips, valid flags, enables and window lengths: the 9-bit one used for
// 64-chip windows (windows of 1..64 chips) and a 12-bit one as used by the
// extra correlator (windows up to 585 chips, the most a 12-bit magnitude
// sum can hold). A reference sums +-magnitude per chip in plain integers;
// at each window start the finished sum is queued and compared with the
// next corr value announced by corr_valid.
module tb_sm_corr;
  import demod_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sm4_t din = '0;
  logic pn = 0, wal = 0, valid = 0;
  logic first_a = 0, first_b = 0;
  logic signed [9:0]  corr_a;
  logic signed [12:0] corr_b;
  logic va, vb;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  sm_corr #(.ACC_W(9))  dut_a (.clk, .rst_n, .en, .din, .pn, .wal, .valid, .first(first_a),
                               .corr(corr_a), .corr_valid(va));
  sm_corr #(.ACC_W(12)) dut_b (.clk, .rst_n, .en, .din, .pn, .wal, .valid, .first(first_b),
                               .corr(corr_b), .corr_valid(vb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  int qa[$], qb[$];
  int acc_a = 0, acc_b = 0, left_a = 0, left_b = 0, nwin_a = 0, nwin_b = 0;

  initial begin
    repeat (4_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400_000; n++) begin
      // new inputs
      en    = ($urandom_range(0, 4) != 0);
      din   = sm4_t'($urandom_range(0, 15));
      pn    = 1'($urandom);
      wal   = 1'($urandom);
      valid = ($urandom_range(0, 7) != 0);
      first_a = (left_a == 0);
      first_b = (left_b == 0);
      @(posedge clk);
      #0;
      // outputs from the previous clock are checked at this edge's inputs
      if (en) begin
        v = valid ? int'(din.mag) : 0;
        if (din.sign ^ pn ^ wal) v = -v;
        if (first_a) begin qa.push_back(acc_a); acc_a = v; left_a = $urandom_range(1, 64); end
        else acc_a += v;
        if (first_b) begin qb.push_back(acc_b); acc_b = v; left_b = $urandom_range(1, 585); end
        else acc_b += v;
        left_a--; left_b--;
      end
      @(negedge clk);
      if (en && va) begin
        check(qa.size() > 0 && int'(corr_a) == qa[0],
              $sformatf("9-bit corr %0d expected %0d", corr_a, qa.size() ? qa[0] : 0));
        if (qa.size()) void'(qa.pop_front());
        nwin_a++;
      end
      if (en && vb) begin
        check(qb.size() > 0 && int'(corr_b) == qb[0],
              $sformatf("12-bit corr %0d expected %0d", corr_b, qb.size() ? qb[0] : 0));
        if (qb.size()) void'(qb.pop_front());
        nwin_b++;
      end
    end
    check(nwin_a > 1000 && nwin_b > 100, $sformatf("windows checked %0d/%0d", nwin_a, nwin_b));
    check(qa.size() <= 2 && qb.size() <= 2, "results missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mpcorr: self-checking test of a coarse-lock (multipath) correlator.
//
// Frames of 1088 chips are driven with random enables, invalid samples and
// a random PN chip per chip. Each frame the samples are correlated with the
// PN to a chosen degree (from pure noise to fully aligned), so the energy
// lands on both sides of the threshold. The reference sums each rail over
// 64-chip windows, adds the magnitudes of the first 16 windows, and
// predicts the block's outputs for that frame: cmpth_l low when |I|+|Q|
// reaches THRESA; ipq_or_i = |I|+|Q| before lock and |I| in lock; q = |Q|.
module tb_mpcorr;
  import demod_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sm4_t ion = '0, qon = '0;
  logic pn = 0, valid = 0, blk_first = 0, frame_first = 0, lock = 0;
  logic [THRA_W-1:0] thresa = 0;
  logic cmpth_l, out_valid;
  logic [THRA_W-1:0] ipq_or_i;
  logic [LONG_W-1:0] q;
  int checks = 0, failures = 0, nfr = 0, n_hit = 0, n_miss = 0;

  always #1 clk = ~clk;

  mpcorr dut (.clk, .rst_n, .en, .ion, .qon, .pn, .valid, .blk_first, .frame_first, .lock,
              .thresa, .cmpth_l, .ipq_or_i, .q, .out_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  typedef struct { int ipq; int ie; int qe; bit lk; int th; } frame_t;
  frame_t exp_q[$];

  initial begin
    repeat (10_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  initial begin
    int fc, bias, si, sq, ie, qe, vi, vq;
    frame_t f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fc = 0; si = 0; sq = 0; ie = 0; qe = 0; bias = 0;
    for (int n = 0; n < 1_400_000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      pn = 1'($urandom);
      valid = ($urandom_range(0, 15) != 0);
      // bias: percentage of chips whose sign follows the PN
      vi = $urandom_range(0, 7); vq = $urandom_range(0, 7);
      ion = '{sign: ($urandom_range(0, 99) < bias) ? pn : 1'($urandom), mag: 3'(vi)};
      qon = '{sign: ($urandom_range(0, 99) < bias) ? !pn : 1'($urandom), mag: 3'(vq)};
      blk_first = (fc % 64 == 0);
      frame_first = (fc == 0);
      @(posedge clk);
      if (en) begin
        int ci, cq;
        ci = valid ? ((ion.sign ^ pn) ? -vi : vi) : 0;
        cq = valid ? ((qon.sign ^ pn) ? -vq : vq) : 0;
        if (fc % 64 == 0) begin si = 0; sq = 0; end
        si += ci; sq += cq;
        if (fc % 64 == 63 && fc < 1024) begin ie += iabs(si); qe += iabs(sq); end
        if (fc == 1023) begin
          f.ie = ie; f.qe = qe; f.ipq = ie + qe; f.lk = lock; f.th = int'(thresa);
          exp_q.push_back(f);
          ie = 0; qe = 0;
        end
        fc = (fc + 1) % 1088;
        if (fc == 0) begin
          bias = $urandom_range(0, 100);
          thresa = 14'($urandom_range(300, 8000));
        end
        // lock changes only well away from the result
        if (fc == 500) lock = 1'($urandom);
      end
      @(negedge clk);
      if (en && out_valid) begin
        nfr++;
        if (exp_q.size() == 0) check(0, "result without a frame");
        else begin
          f = exp_q.pop_front();
          check(cmpth_l == !(f.ipq >= f.th),
                $sformatf("compare: energy %0d threshold %0d cmpth_l %b", f.ipq, f.th, cmpth_l));
          check(int'(ipq_or_i) == (f.lk ? f.ie : f.ipq),
                $sformatf("ipq_or_i %0d expected %0d (lock %0d)", ipq_or_i, f.lk ? f.ie : f.ipq, f.lk));
          check(int'(q) == f.qe, $sformatf("q %0d expected %0d", q, f.qe));
          if (f.ipq >= f.th) n_hit++; else n_miss++;
        end
      end
    end
    check(nfr > 200 && n_hit > 20 && n_miss > 20, $sformatf("frames %0d, over %0d, under %0d", nfr, n_hit, n_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

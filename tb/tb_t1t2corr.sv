// tb_t1t2corr: self-checking test of the early/late (phase loop) correlators.
//
// Frames of 1088 chips carry random off-time samples whose signs follow the
// PN either in step (late rail aligned) or one chip ahead (early rail
// aligned), to a random degree. The reference forms, per frame, the late
// energy from each chip's off-time sample and the early energy from the
// previous chip's off-time sample, both against the current PN chip, as
// |I|+|Q| over the first 16 windows of 64 chips. It predicts: t_reset when
// early+late < THRESB; change_phase_l low when |early-late| > THRESC;
// extend_phase when early < late; and the two energies themselves.
module tb_t1t2corr;
  import demod_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sm4_t ioff = '0, qoff = '0;
  logic pn = 0, valid = 0, blk_first = 0, frame_first = 0;
  logic [THRB_W-1:0] thresb = 0;
  logic [THRC_W-1:0] thresc = 0;
  logic t_reset, change_phase_l, extend_phase, out_valid;
  logic [THRA_W-1:0] e_early, e_late;
  int checks = 0, failures = 0, nfr = 0, n_ext = 0, n_red = 0, n_hold = 0, n_trst = 0;

  always #1 clk = ~clk;

  t1t2corr dut (.clk, .rst_n, .en, .ioff, .qoff, .pn, .valid, .blk_first, .frame_first,
                .thresb, .thresc, .t_reset, .change_phase_l, .extend_phase, .e_early,
                .e_late, .out_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  typedef struct { int ee; int el; int tb; int tc; } frame_t;
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

  function automatic int cval(sm4_t s, bit p, bit v);
    int m;
    m = v ? int'(s.mag) : 0;
    return (s.sign ^ p) ? -m : m;
  endfunction

  initial begin
    int fc, bias, mode;
    int ei, eq, li, lq, sei, seq, sli, slq;
    bit pn_next;
    sm4_t pi_, pq_;
    bit pv;
    frame_t f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fc = 0; bias = 0; mode = 0; pn_next = 1'($urandom); pi_ = '0; pq_ = '0; pv = 0;
    ei = 0; eq = 0; li = 0; lq = 0; sei = 0; seq = 0; sli = 0; slq = 0;
    for (int n = 0; n < 1_400_000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      pn = pn_next;
      pn_next = 1'($urandom);
      valid = ($urandom_range(0, 15) != 0);
      // mode 0: samples follow this chip's PN; mode 1: the next chip's
      ioff = '{sign: ($urandom_range(0, 99) < bias) ? (mode ? pn_next : pn) : 1'($urandom),
               mag: 3'($urandom)};
      qoff = '{sign: ($urandom_range(0, 99) < bias) ? (mode ? pn_next : pn) : 1'($urandom),
               mag: 3'($urandom)};
      blk_first = (fc % 64 == 0);
      frame_first = (fc == 0);
      @(posedge clk);
      if (en) begin
        if (fc % 64 == 0) begin sei = 0; seq = 0; sli = 0; slq = 0; end
        sli += cval(ioff, pn, valid); slq += cval(qoff, pn, valid);
        sei += cval(pi_, pn, pv);     seq += cval(pq_, pn, pv);
        if (fc % 64 == 63 && fc < 1024) begin
          ei += iabs(sei); eq += iabs(seq); li += iabs(sli); lq += iabs(slq);
        end
        if (fc == 1023) begin
          f.ee = ei + eq; f.el = li + lq; f.tb = int'(thresb); f.tc = int'(thresc);
          exp_q.push_back(f);
          ei = 0; eq = 0; li = 0; lq = 0;
        end
        pi_ = ioff; pq_ = qoff; pv = valid;
        fc = (fc + 1) % 1088;
        if (fc == 0) begin
          bias = $urandom_range(0, 100);
          mode = $urandom_range(0, 1);
          thresb = 15'($urandom_range(0, 9000));
          thresc = 15'($urandom_range(0, 5000));
        end
      end
      @(negedge clk);
      if (en && out_valid) begin
        nfr++;
        if (exp_q.size() == 0) check(0, "result without a frame");
        else begin
          f = exp_q.pop_front();
          check(int'(e_early) == f.ee && int'(e_late) == f.el,
                $sformatf("energies %0d/%0d expected %0d/%0d", e_early, e_late, f.ee, f.el));
          check(t_reset == (f.ee + f.el < f.tb), "t_reset");
          check(change_phase_l == !(iabs(f.ee - f.el) > f.tc), "change_phase_l");
          check(extend_phase == (f.ee < f.el), "extend_phase");
          if (f.ee + f.el < f.tb) n_trst++;
          if (iabs(f.ee - f.el) > f.tc) begin
            if (f.ee < f.el) n_ext++; else n_red++;
          end else n_hold++;
        end
      end
    end
    check(nfr > 200 && n_ext > 10 && n_red > 10 && n_hold > 10 && n_trst > 10,
          $sformatf("frames %0d: extend %0d reduce %0d hold %0d loss %0d", nfr, n_ext, n_red, n_hold, n_trst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

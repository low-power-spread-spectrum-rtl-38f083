// tb_drcorr: self-checking test of the data recovery correlator pair.
//
// Random I and Q samples are despread with random PN and Walsh chips over
// 64-chip symbols, with random enables and invalid samples. A reference
// keeps the +-magnitude sum of each rail per symbol; each dump64 must carry
// the two sums of the symbol that has just ended.
module tb_drcorr;
  import demod_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sm4_t ion = '0, qon = '0;
  logic pn = 0, wal = 0, valid = 0, blk_first = 0;
  logic signed [SHORT_W-1:0] i_acc, q_acc;
  logic dump64;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  drcorr dut (.clk, .rst_n, .en, .ion, .qon, .pn, .wal, .valid, .blk_first,
              .i_acc, .q_acc, .dump64);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int chip(sm4_t d, bit p, bit w, bit v);
    int x;
    x = v ? int'(d.mag) : 0;
    return (d.sign ^ p ^ w) ? -x : x;
  endfunction

  int qi[$], qq[$];
  int sum_i = 0, sum_q = 0, cnt = 0, nsym = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200_000; n++) begin
      en  = ($urandom_range(0, 3) != 0);
      ion = sm4_t'($urandom_range(0, 15));
      qon = sm4_t'($urandom_range(0, 15));
      pn  = 1'($urandom);
      wal = 1'($urandom);
      valid = ($urandom_range(0, 9) != 0);
      blk_first = (cnt == 0);
      @(posedge clk);
      if (en) begin
        if (blk_first) begin
          qi.push_back(sum_i); qq.push_back(sum_q);
          sum_i = chip(ion, pn, wal, valid); sum_q = chip(qon, pn, wal, valid);
        end else begin
          sum_i += chip(ion, pn, wal, valid); sum_q += chip(qon, pn, wal, valid);
        end
        cnt = (cnt + 1) % 64;
      end
      @(negedge clk);
      if (en && dump64) begin
        check(qi.size() > 0 && int'(i_acc) == qi[0] && int'(q_acc) == qq[0],
              $sformatf("symbol sums %0d/%0d expected %0d/%0d", i_acc, q_acc,
                        qi.size() ? qi[0] : 0, qq.size() ? qq[0] : 0));
        if (qi.size()) begin void'(qi.pop_front()); void'(qq.pop_front()); end
        nsym++;
      end
    end
    check(nsym > 2000, $sformatf("symbols checked %0d", nsym));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

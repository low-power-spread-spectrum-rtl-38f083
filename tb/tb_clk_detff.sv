// tb_clk_detff: self-checking test of the sampling strobe chain.
//
// Drives random chip edges (clkx, at most one per four clocks, as from the
// clock generator, with 3- and 5-quarter chips mixed in) and random kill
// requests. Checks: the control strobe clk_ion_pn follows every chip edge
// one quarter later, killed or not; the on-time I strobe follows only
// unkilled edges; Q on-time, I off-time and Q off-time follow at one-quarter
// spacing, so the off-time samples are half a chip after the on-time ones.
module tb_clk_detff;
  logic clk = 0, rst_n = 0, clkx = 0, killpulse_l = 1;
  logic clk_ion_pn, clk_ion, clk_qon, clk_ioff, clk_qoff;
  int checks = 0, failures = 0, n_kill = 0;
  bit hx [$];   // history of clkx, newest first
  bit hk [$];   // history of clkx && killpulse_l

  always #1 clk = ~clk;

  clk_detff dut (.clk, .rst_n, .clkx, .killpulse_l, .clk_ion_pn, .clk_ion, .clk_qon,
                 .clk_ioff, .clk_qoff);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int gap;
    for (int i = 0; i < 6; i++) begin hx.push_front(0); hk.push_front(0); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    gap = 4;
    for (int n = 0; n < 40_000; n++) begin
      gap--;
      clkx = (gap == 0);
      killpulse_l = !(clkx && $urandom_range(0, 5) == 0);
      if (clkx) gap = $urandom_range(3, 5);
      if (!killpulse_l) n_kill++;
      @(posedge clk);
      hx.push_front(clkx); hk.push_front(clkx && killpulse_l);
      void'(hx.pop_back()); void'(hk.pop_back());
      @(negedge clk);
      check(clk_ion_pn == hx[0], "control strobe one quarter after the chip edge");
      check(clk_ion == hk[0], "I on-time strobe one quarter after an unkilled edge");
      check(clk_qon == hk[1], "Q on-time strobe");
      check(clk_ioff == hk[2], "I off-time strobe half a chip after I on-time");
      check(clk_qoff == hk[3], "Q off-time strobe");
    end
    check(n_kill > 100, "kills exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_datamux: self-checking test of the sample demultiplexer.
//
// Chip edges come at random spacings of 3, 4 or 5 quarters (as around
// phase changes), with the on-time strobe removed on some edges that start
// a chip; the strobes are produced by a clk_detff. The I and Q inputs
// change every quarter. For the chip starting at edge c, the block must
// deliver, at the next chip's control strobe, I on-time = I at c+1, Q
// on-time = Q at c+2, I off-time = I at c+3 and Q off-time = Q at c+4
// (quarters), and dvalid low exactly for chips whose on-time edge was
// removed. A removed edge removes all four sample strobes of its chip, so
// the samples of such a chip are not checked (they are never summed).
module tb_datamux;
  import demod_pkg::*;
  logic clk = 0, rst_n = 0, clkx = 0, killpulse_l = 1;
  sm4_t iin = '0, qin = '0;
  logic clk_ion_pn, clk_ion, clk_qon, clk_ioff, clk_qoff;
  sm4_t ion, qon, ioff, qoff;
  logic dvalid;
  int checks = 0, failures = 0, n_inv = 0, n_chips = 0;

  always #1 clk = ~clk;

  clk_detff u_det (.clk, .rst_n, .clkx, .killpulse_l, .clk_ion_pn, .clk_ion, .clk_qon,
                   .clk_ioff, .clk_qoff);
  datamux dut (.clk, .rst_n, .iin, .qin, .clk_ion_pn, .clk_ion, .clk_qon, .clk_ioff, .clk_qoff,
               .ion, .qon, .ioff, .qoff, .dvalid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  sm4_t iv [int];
  sm4_t qv [int];

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int cyc, gap, cur, prev, nxt;
    bit cur_k, prev_k;
    cyc = 0; gap = 4; cur = -1; prev = -1; cur_k = 0; prev_k = 0; nxt = 4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100_000; n++) begin
      iin = sm4_t'($urandom); qin = sm4_t'($urandom);
      clkx = (cyc == nxt);
      killpulse_l = !(clkx && gap == 3 && $urandom_range(0, 1) == 0);
      @(posedge clk);
      iv[cyc] = iin; qv[cyc] = qin;
      if (clkx) begin
        prev = cur; prev_k = cur_k;
        cur = cyc; cur_k = !killpulse_l;
        gap = $urandom_range(3, 5);
        nxt = cyc + gap;
      end
      // outputs for chip `prev` are produced at edge cur+1
      if (prev >= 0 && cyc == cur + 1) begin
        @(negedge clk);
        n_chips++;
        check(dvalid == !prev_k, "dvalid marks chips without an on-time edge");
        if (!prev_k) begin
          check(ion == iv[prev + 1], "I on-time sample");
          check(qon == qv[prev + 2], "Q on-time sample");
          check(ioff == iv[prev + 3], "I off-time sample");
          check(qoff == qv[prev + 4], $sformatf("Q off-time sample (chip of %0d quarters)", cur - prev));
        end
        if (prev_k) n_inv++;
        cyc++;
        continue;
      end
      cyc++;
      @(negedge clk);
    end
    check(n_chips > 10000 && n_inv > 500, $sformatf("chips %0d, invalid %0d", n_chips, n_inv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_walsh_gen: self-checking test of the Walsh code generator.
//
// For every one of the 64 codes the output is compared with a reference
// built from the definition: chip j of code w is the parity of w AND the
// Gray code of j (0 = +1). The test also checks the counter, its restart
// on the chip after PN all-ones, holding while stalled or disabled, and
// that distinct codes are orthogonal over a 64-chip symbol.
module tb_walsh_gen;
  logic clk = 0, rst_n = 0, en = 0, stall_l = 1, pn_allones_l = 1;
  logic [5:0] walshnum = 0;
  logic walshout;
  logic [5:0] walshcnt;
  int checks = 0, failures = 0;
  bit seq [64][64];

  always #1 clk = ~clk;

  walsh_gen dut (.clk, .rst_n, .en, .stall_l, .pn_allones_l, .walshnum, .walshout, .walshcnt);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit wref(int w, int j);
    return ^(6'(w) & 6'(j ^ (j >> 1)));
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int j;
    for (int w = 0; w < 64; w++) begin
      walshnum = 6'(w);
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      j = 0;
      while (j < 200) begin
        check(walshcnt == 6'(j % 64), $sformatf("count %0d vs %0d", walshcnt, j % 64));
        check(walshout == wref(w, j % 64), $sformatf("code %0d chip %0d", w, j));
        if (j < 64) seq[w][j] = walshout;
        en = ($urandom_range(0, 2) != 0);
        stall_l = ($urandom_range(0, 5) != 0);
        pn_allones_l = !(en && stall_l && j == 150);
        @(negedge clk);
        if (en && stall_l) j = (j == 150) ? 192 : j + 1;   // restart at symbol start
        pn_allones_l = 1;
      end
    end
    // orthogonality
    for (int a = 0; a < 64; a++)
      for (int b = a + 1; b < 64; b += 7) begin
        int s = 0;
        for (int k = 0; k < 64; k++) s += (seq[a][k] ^ seq[b][k]) ? -1 : 1;
        check(s == 0, $sformatf("codes %0d and %0d not orthogonal", a, b));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pn_gen: self-checking test of the pilot PN generator.
//
// A reference LFSR in the testbench (same taps, own state) predicts every
// chip. Enable and stall are driven at random. Checks: the output chip and
// its three delayed copies, the all-ones flag (low exactly on the FFFF
// chip, once per 32768 chips), the restart from the seed after all ones,
// holding during stalls, and the reload input.
module tb_pn_gen;
  logic clk = 0, rst_n = 0, en = 0, stall_l = 1, reload = 0;
  logic pn_out, pn_out1d, pn_out2d, pn_out3d, pn_allones_l;
  logic [15:0] pn_state;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  pn_gen dut (.clk, .rst_n, .en, .stall_l, .reload, .pn_out, .pn_out1d, .pn_out2d,
              .pn_out3d, .pn_allones_l, .pn_state);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // reference: state list from the seed
  logic [15:0] ref_s;
  logic [2:0]  ref_d;
  int          ref_i, wraps, allones_seen;

  initial begin
    repeat (200_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    ref_s = 16'h2A88; ref_d = 0; ref_i = 0; wraps = 0; allones_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3 * 32768 + 500; n++) begin
      @(negedge clk);
      // compare present outputs with the reference
      check(pn_state == ref_s, $sformatf("state %h vs %h at %0d", pn_state, ref_s, ref_i));
      check(pn_out == ref_s[0], "pn_out");
      check({pn_out3d, pn_out2d, pn_out1d} == ref_d, "delayed outputs");
      check(pn_allones_l == (ref_s != 16'hFFFF), "allones flag");
      if (!pn_allones_l) allones_seen++;
      // drive next inputs
      en      = ($urandom_range(0, 3) != 0);
      stall_l = ($urandom_range(0, 7) != 0);
      reload  = (n == 3 * 32768 + 200);
      @(posedge clk);
      if (en && reload) begin
        ref_s = 16'h2A88; ref_d = 0; ref_i = 0;
      end else if (en && stall_l) begin
        ref_d = {ref_d[1:0], ref_s[0]};
        if (ref_s == 16'hFFFF) begin
          ref_s = 16'h2A88; ref_i = 0; wraps++;
        end else begin
          ref_s = {ref_s[15] ^ ref_s[13] ^ ref_s[4] ^ ref_s[0], ref_s[15:1]};
          ref_i++;
        end
      end
      if (ref_i > 32767) check(0, "reference period exceeded 32768");
    end
    check(wraps >= 1, "PN sequence wrapped");
    check(allones_seen > 0, "all-ones flag seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

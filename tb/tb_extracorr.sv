// tb_extracorr: self-checking test of the extra (general purpose) correlator.
//
// Random sign-magnitude samples, PN and Walsh chips are fed on the block's
// own clock, with dumps at random intervals of 1..585 chips (the longest a
// 13-bit signed result holds at full scale) and occasional result resets.
// A reference keeps the +-magnitude sum between dumps; each new result must
// equal the sum of the interval that the dump closed, and a reset must
// clear the result and its valid flag.
module tb_extracorr;
  logic ec64clk = 0, rst_n = 0;
  logic [3:0] ecdata = 0;
  logic ecpn = 0, ecw = 0, ecdump = 0, ecrstdump = 0;
  logic signed [12:0] result;
  logic result_valid;
  int checks = 0, failures = 0, nres = 0, nrst = 0;

  always #1 ec64clk = ~ec64clk;

  extracorr dut (.ec64clk, .rst_n, .ecdata, .ecpn, .ecw, .ecdump, .ecrstdump, .result,
                 .result_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge ec64clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int acc, left, v, pend[$], exp_r, exp_v;
    acc = 0; left = 0; exp_r = 0; exp_v = 0;
    repeat (2) @(negedge ec64clk);
    rst_n = 1;
    for (int n = 0; n < 300_000; n++) begin
      ecdata = 4'($urandom);
      ecpn = 1'($urandom);
      ecw = 1'($urandom);
      ecdump = (left == 0);
      ecrstdump = ($urandom_range(0, 20000) == 0);
      @(posedge ec64clk);
      v = int'(ecdata[2:0]);
      if (ecdata[3] ^ ecpn ^ ecw) v = -v;
      // a dump is announced by the correlator two clocks after the chip
      pend.push_back(ecdump ? acc : 32'h7fffffff);
      if (ecdump) begin acc = v; left = $urandom_range(1, 585); end
      else acc += v;
      left--;
      if (pend.size() > 3) begin
        int r;
        r = pend.pop_front();
        if (r != 32'h7fffffff) begin exp_r = r; exp_v = 1; end
      end
      if (ecrstdump) begin exp_r = 0; exp_v = 0; nrst++; end
      @(negedge ec64clk);
      check(result_valid == exp_v && int'(result) == exp_r,
            $sformatf("result %0d/%b expected %0d/%0d", result, result_valid, exp_r, exp_v));
      if (result_valid && ecdump) nres++;
    end
    check(nrst > 3, "result resets exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

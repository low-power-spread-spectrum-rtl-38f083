// tb_testmode: exhaustive test of the input format selection.
//
// Every pair of 4-bit input codes is applied in each mode with all odd/even
// selections. Reference: normal mode passes the sign-magnitude code through;
// binary mode maps code b to the value b-8; two's complement mode reads the
// code as a signed value and takes the alternate (x) inputs on odd samples.
// The two converted values are re-encoded as sign-magnitude, clipping -8 to
// -7. The undefined mode behaves as normal mode.
module tb_testmode;
  import demod_pkg::*;
  tstmode_e tstmode = TM_NORMAL;
  logic odd_i = 0, odd_q = 0;
  logic [3:0] iin = 0, qin = 0, iinx = 0, qinx = 0;
  sm4_t iout, qout;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #1 clk = ~clk;

  testmode dut (.tstmode, .odd_i, .odd_q, .iin, .qin, .iinx, .qinx, .iout, .qout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0] enc(int v);
    if (v < -7) v = -7;
    return (v < 0) ? {1'b1, 3'(-v)} : {1'b0, 3'(v)};
  endfunction

  function automatic logic [3:0] expect_out(int mode, logic [3:0] a, logic [3:0] ax, bit odd);
    logic [3:0] s;
    case (mode)
      1: return enc(int'(a) - 8);
      2: begin s = odd ? ax : a; return enc(s[3] ? int'(s) - 16 : int'(s)); end
      default: return a;
    endcase
  endfunction

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++)
          for (int o = 0; o < 4; o++) begin
            tstmode = tstmode_e'(m);
            iin = 4'(a); qin = 4'(b); iinx = 4'(b); qinx = 4'(a ^ 5);
            odd_i = o[0]; odd_q = o[1];
            @(negedge clk);
            check(iout == expect_out(m, iin, iinx, odd_i),
                  $sformatf("mode %0d I in %h/%h odd %0d: %h", m, iin, iinx, odd_i, iout));
            check(qout == expect_out(m, qin, qinx, odd_q),
                  $sformatf("mode %0d Q in %h/%h odd %0d: %h", m, qin, qinx, odd_q, qout));
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

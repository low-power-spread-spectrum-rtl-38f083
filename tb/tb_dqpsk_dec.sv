// tb_dqpsk_dec: self-checking test of the differential QPSK decision.
//
// Feeds random (I, Q) symbol sums, plus points on the decision boundaries,
// and compares each output dibit with a reference that computes the phase
// change as an angle: (-45, 45] -> 00, (45, 135] -> 01, (135, 225] -> 11,
// (225, 315] -> 10 degrees. The first symbol after reset only primes the
// history and must not produce an output.
module tb_dqpsk_dec;
  import demod_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic signed [SHORT_W-1:0] i_in = 0, q_in = 0;
  logic [1:0] bits;
  logic out_valid;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  dqpsk_dec dut (.clk, .rst_n, .en, .in_valid, .i_in, .q_in, .bits, .out_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // decision from exact integer products; angle ranges half-open as above
  function automatic logic [1:0] ref_dec(int i0, int q0, int i1, int q1);
    longint re, im;
    real a;
    re = longint'(i1) * i0 + longint'(q1) * q0;
    im = longint'(i0) * q1 - longint'(i1) * q0;
    if (re == 0 && im == 0) return 2'b00;
    if (re == im && re > 0) return 2'b00;      // exactly +45
    if (-re == im && im > 0) return 2'b01;     // exactly +135
    if (re == im && re < 0) return 2'b11;      // exactly +225
    if (re == -im && re > 0) return 2'b10;     // exactly -45
    a = $atan2(real'(im), real'(re)) * 180.0 / 3.14159265358979;
    if (a < 0) a += 360.0;
    if (a < 45.0 || a > 315.0) return 2'b00;
    if (a < 135.0) return 2'b01;
    if (a < 225.0) return 2'b11;
    return 2'b10;
  endfunction

  int pi_, pq_, have = 0, nout = 0;
  int exp_q[$];

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int vi, vq;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100_000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      in_valid = ($urandom_range(0, 2) == 0);
      case ($urandom_range(0, 5))
        0: begin vi = $urandom_range(0, 6) - 3; vq = $urandom_range(0, 6) - 3; end
        1: begin vi = $urandom_range(0, 200) - 100; vq = vi; end
        2: begin vi = $urandom_range(0, 200) - 100; vq = -vi; end
        default: begin vi = $urandom_range(0, 1022) - 511; vq = $urandom_range(0, 1022) - 511; end
      endcase
      i_in = SHORT_W'(vi); q_in = SHORT_W'(vq);
      @(posedge clk);
      if (en && in_valid) begin
        if (have) exp_q.push_back(int'(ref_dec(pi_, pq_, vi, vq)));
        pi_ = vi; pq_ = vq; have = 1;
      end
      @(negedge clk);
      if (en && out_valid) begin
        check(exp_q.size() > 0 && int'(bits) == exp_q[0],
              $sformatf("dibit %b expected %b", bits, exp_q.size() ? 2'(exp_q[0]) : 2'b0));
        if (exp_q.size()) void'(exp_q.pop_front());
        nout++;
      end else if (en) begin
        check(!out_valid, "output without a symbol");
      end
    end
    check(nout > 10000 && exp_q.size() == 0, $sformatf("decisions %0d, left %0d", nout, exp_q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

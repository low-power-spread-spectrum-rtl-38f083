// tb_lock_fsm: self-checking test of the lock status state machine.
//
// Random frame-end strobes, correlator compare results and loss-of-energy
// flags drive the machine; a reference written from the state description
// (00 no lock -> 01 lock when any correlator passed threshold at a frame
// end, 01 -> 10 when the early/late energy fell below threshold at a frame
// end, 10 -> 00 on the next chip) predicts lock, lockrst and the state
// bits. Every transition must be visited.
module tb_lock_fsm;
  logic clk = 0, rst_n = 0, en = 0, valid_data = 0, t_reset = 0;
  logic [3:0] c_l = 4'hF;
  logic lock, lockrst;
  logic [1:0] lockstbits;
  int checks = 0, failures = 0;
  int n_acq = 0, n_loss = 0;

  always #1 clk = ~clk;

  lock_fsm dut (.clk, .rst_n, .en, .valid_data, .c_l, .t_reset, .lock, .lockrst, .lockstbits);

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
    logic [1:0] r;
    r = 2'b00;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100_000; n++) begin
      check(lockstbits == r, $sformatf("state %b expected %b", lockstbits, r));
      check(lock == (r == 2'b01) && lockrst == (r == 2'b10), "lock/lockrst outputs");
      en = ($urandom_range(0, 3) != 0);
      valid_data = ($urandom_range(0, 3) == 0);
      c_l = ($urandom_range(0, 2) == 0) ? 4'(~(1 << $urandom_range(0, 3))) : 4'hF;
      t_reset = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (en) begin
        case (r)
          2'b00: if (valid_data && c_l != 4'hF) begin r = 2'b01; n_acq++; end
          2'b01: if (valid_data && t_reset) begin r = 2'b10; n_loss++; end
          default: r = 2'b00;
        endcase
      end
      @(negedge clk);
    end
    check(n_acq > 100 && n_loss > 100, $sformatf("acquisitions %0d, losses %0d", n_acq, n_loss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_updctrl: self-checking test of the update control (search) machine.
//
// A reference of the frame timing runs beside the block: frames of 1088
// counted chips, the 1024-chip dump at chip 1023, symbol starts every 64
// chips, and the decision at the last chip of each frame. With no
// correlator over threshold the PN must stall for exactly 4 chips (search
// step); with correlator k (lowest index wins) it must stall k chips and
// then stay without stalls while lock is held; when lock drops the search
// resumes. lock is driven like the lock state machine would, with random
// losses. Stalled chips must not advance the frame counter.
module tb_updctrl;
  logic clk = 0, rst_n = 0, en = 0, lock = 0;
  logic [3:0] c_l = 4'hF;
  logic valid_data, dump1024, upd63, blk_first, frame_first, pnstall_l, stall_search;
  logic [2:0] updstbits;
  logic [10:0] frame_cnt;
  int checks = 0, failures = 0;
  int n_search = 0, n_lockstall [4] = '{0, 0, 0, 0}, n_drop = 0;

  always #1 clk = ~clk;

  updctrl dut (.clk, .rst_n, .en, .c_l, .lock, .valid_data, .dump1024, .upd63, .blk_first,
               .frame_first, .pnstall_l, .stall_search, .updstbits, .frame_cnt);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int fc, stall, locked, srch;
    fc = 0; stall = 1; locked = 0; srch = 0;   // one stalled chip after reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1_500_000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      // correlator results only matter at the frame end
      c_l = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
      #0;
      check(pnstall_l == (stall == 0), $sformatf("pnstall_l %b, model stall %0d", pnstall_l, stall));
      check(stall_search == (stall > 0 && srch), "stall_search");
      if (stall == 0) begin
        check(frame_cnt == 11'(fc), $sformatf("frame count %0d vs %0d", frame_cnt, fc));
        check(valid_data == (fc == 1087) && dump1024 == (fc == 1023) && frame_first == (fc == 0),
              "frame strobes");
        check(blk_first == (fc % 64 == 0) && upd63 == (fc % 64 == 63), "symbol strobes");
      end else begin
        check(!valid_data && !dump1024 && !frame_first && !blk_first && !upd63,
              "strobes during a stall");
      end
      @(posedge clk);
      if (en) begin
        if (stall > 0) begin
          stall--;
        end else begin
          if (fc == 1087 && !locked) begin
            if (c_l == 4'hF) begin stall = 4; srch = 1; n_search++; end
            else begin
              int k;
              k = 0;
              while (c_l[k]) k++;
              stall = k; srch = 0; locked = 1; n_lockstall[k]++;
            end
          end
          fc = (fc + 1) % 1088;
        end
      end
      @(negedge clk);
      // lock follows the model; random loss at a frame end while locked
      if (locked && lock && en && fc == 0 && stall == 0 && $urandom_range(0, 3) == 0) begin
        lock = 0; locked = 0; n_drop++;
        // the machine notices on its next enabled chip
      end else if (locked) lock = 1;
      if (!lock && !locked && dut.st == 3'd4) begin
        // wait until the block leaves the locked state
        do begin
          en = 1;
          @(posedge clk);
          if (stall == 0) fc = (fc + 1) % 1088;
          @(negedge clk);
        end while (dut.st == 3'd4);
      end
    end
    $display("search stalls %0d, lock stalls k=0..3: %0d %0d %0d %0d, drops %0d", n_search,
             n_lockstall[0], n_lockstall[1], n_lockstall[2], n_lockstall[3], n_drop);
    check(n_search > 20 && n_lockstall[0] > 0 && n_lockstall[1] > 0 && n_lockstall[2] > 0 &&
          n_lockstall[3] > 0 && n_drop > 5, "all search and lock cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

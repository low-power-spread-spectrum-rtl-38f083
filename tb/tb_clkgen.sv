// tb_clkgen: self-checking test of the chip clock generator.
//
// Random lock, frame-end, change and direction inputs are applied; the
// reference looks only at the chip edges (clkx) the block produces and
// predicts their spacing. Normally an edge every 4 quarters. A change
// request (lock, valid_data and change_phase_l low, sampled at a chip edge)
// is latched into ext_l/shr_l and acted on at the next edge: extend makes
// the following chip 5 quarters, reduce makes it 3 quarters and removes the
// correlator edge at its end (killpulse_l low). The selected phase must stay
// one-hot-low and move one step later on extend and one step earlier on
// reduce; requests without lock or without a change flag must do nothing.
module tb_clkgen;
  logic clk = 0, clkrst = 1, rst_n = 0;
  logic valid_data = 0, extend_phase = 0, change_phase_l = 1, lock = 0;
  logic clkx, killpulse_l, ext_l, shr_l;
  logic [3:0] sel_clk_l;
  logic [1:0] qc;
  int checks = 0, failures = 0, n_ext = 0, n_red = 0, n_chip = 0;

  always #1 clk = ~clk;

  clkgen dut (.clk, .clkrst, .rst_n, .valid_data, .extend_phase, .change_phase_l, .lock,
              .clkx, .killpulse_l, .sel_clk_l, .ext_l, .shr_l, .qc);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int sel_idx(logic [3:0] s);
    case (s)
      4'b0111: return 0;
      4'b1011: return 1;
      4'b1101: return 2;
      4'b1110: return 3;
      default: return -1;
    endcase
  endfunction

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int since, gap, pend, kill_next, idx, last_idx;
    repeat (2) @(negedge clk);
    clkrst = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    since = -1; gap = 4; pend = 0; kill_next = 0; last_idx = 0;
    for (int n = 0; n < 200_000; n++) begin
      lock = ($urandom_range(0, 7) != 0);
      valid_data = ($urandom_range(0, 2) == 0);
      change_phase_l = 1'($urandom);
      extend_phase = 1'($urandom);
      #0;
      idx = sel_idx(sel_clk_l);
      check(idx >= 0, "selection one-hot-low");
      if (clkx) begin
        n_chip++;
        if (since >= 0) check(since == gap, $sformatf("chip of %0d quarters, expected %0d", since, gap));
        check(killpulse_l == !kill_next, "killpulse_l only on the edge ending a reduced chip");
        check(ext_l == (pend != 1) && shr_l == (pend != 2), "ext_l/shr_l hold the latched request");
        // the latched request acts now
        gap = (pend == 1) ? 5 : (pend == 2) ? 3 : 4;
        kill_next = (pend == 2);
        if (pend == 1) n_ext++;
        if (pend == 2) n_red++;
        if (since >= 0 && pend == 0) check(idx == last_idx, "selection unchanged without a request");
        // new request from this edge's inputs
        pend = (lock && valid_data && !change_phase_l) ? (extend_phase ? 1 : 2) : 0;
        since = 0;
        last_idx = (gap == 5) ? (idx + 1) % 4 : (gap == 3) ? (idx + 3) % 4 : idx;
      end else begin
        check(killpulse_l, "killpulse_l high between edges");
      end
      @(posedge clk);
      if (since >= 0) since++;
      @(negedge clk);
    end
    check(n_ext > 1000 && n_red > 1000, $sformatf("extends %0d, reduces %0d", n_ext, n_red));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_regblk: self-checking test of the four double-buffered registers.
//
// Random bus writes (chip select and write strobe low, 2-bit address,
// 15-bit data) go to the front registers; the testbench keeps its own
// front and back copies. The back registers, which the rest of the chip
// sees, must change only while reset is held or in an enabled chip with
// the PN all-ones flag low, and then take the front values. Widths follow
// the register table (6, 14, 15, 15 bits).
module tb_regblk;
  import demod_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, pn_allones_l = 1, csl = 1, wrl = 1;
  reg_addr_e addr = REG_WALSH;
  logic [14:0] datain = 0;
  logic [5:0] walshnum;
  logic [THRA_W-1:0] thresa;
  logic [THRB_W-1:0] thresb;
  logic [THRC_W-1:0] thresc;
  int checks = 0, failures = 0, n_copy = 0;
  logic [14:0] fr [4];
  logic [14:0] bk [4];

  always #1 clk = ~clk;

  regblk dut (.clk, .rst_n, .en, .pn_allones_l, .csl, .wrl, .addr, .datain,
              .walshnum, .thresa, .thresb, .thresc);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(int a, logic [14:0] d);
    addr = reg_addr_e'(a); datain = d; csl = 0; wrl = 0; en = 0;
    @(posedge clk);
    case (a)
      0: fr[0] = {9'd0, d[5:0]};
      1: fr[1] = {1'b0, d[13:0]};
      default: fr[a] = d;
    endcase
    @(negedge clk);
    csl = 1; wrl = 1;
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 4; a++) wr(a, 15'($urandom));
    repeat (2) @(negedge clk);
    bk = fr;
    check(walshnum == bk[0][5:0] && thresa == bk[1][13:0] && thresb == bk[2] && thresc == bk[3],
          "back registers loaded while in reset");
    rst_n = 1;
    for (int n = 0; n < 20_000; n++) begin
      if ($urandom_range(0, 2) == 0) wr($urandom_range(0, 3), 15'($urandom));
      // a strobe with only one of csl/wrl low must not write
      addr = reg_addr_e'($urandom_range(0, 3)); datain = 15'($urandom);
      csl = 1'($urandom); wrl = !csl;
      en = ($urandom_range(0, 1) == 0);
      pn_allones_l = ($urandom_range(0, 19) != 0);
      @(posedge clk);
      if (en && !pn_allones_l) begin bk = fr; n_copy++; end
      @(negedge clk);
      csl = 1; wrl = 1;
      check(walshnum == bk[0][5:0] && thresa == bk[1][13:0] && thresb == bk[2] && thresc == bk[3],
            $sformatf("back registers %h %h %h %h expected %h %h %h %h", walshnum, thresa, thresb, thresc,
                      bk[0], bk[1], bk[2], bk[3]));
    end
    check(n_copy > 100, "copies at PN wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

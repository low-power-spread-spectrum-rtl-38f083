// tb_osb: self-checking test of the observation output selector.
//
// Eight random 28-bit words are presented and changed every clock; the
// selector must register the word chosen by omode on each enabled clock
// and hold its output otherwise.
module tb_osb;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] omode = 0;
  logic [27:0] words [8];
  logic [27:0] odata, exp_d;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  osb dut (.clk, .rst_n, .en, .omode, .words, .odata);

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
    for (int k = 0; k < 8; k++) words[k] = '0;
    exp_d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20_000; n++) begin
      for (int k = 0; k < 8; k++) words[k] = 28'($urandom);
      omode = 3'($urandom);
      en = 1'($urandom);
      @(posedge clk);
      if (en) exp_d = words[omode];
      @(negedge clk);
      check(odata == exp_d, $sformatf("odata %h expected %h", odata, exp_d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// extracorr: stand-alone extra correlator for debugging and power
// measurement.
//
// A 13-bit sm_corr driven entirely from pins on its own clock (EC64CLK):
// ecdata is a 4-bit sign-magnitude sample, ecpn and ecw the PN and Walsh
// chips, ecdump ends a window (the chip with ecdump = 1 starts the next
// one). The window result is latched into result/result_valid; ecrstdump
// clears the result latch. With its own pins and clock the correlator can
// be exercised and measured without the rest of the chip running.
//
// Interface timing: result appears two ec64clk cycles after the ecdump
// chip. The pin set comes from the document; the meaning given to
// ECRSTDUMP (clear the result latch) is this design's reading of its
// one-line description. Asynchronous active-low reset.
module extracorr (
  input  logic              ec64clk,
  input  logic              rst_n,
  input  logic [3:0]        ecdata,
  input  logic              ecpn,
  input  logic              ecw,
  input  logic              ecdump,
  input  logic              ecrstdump,
  output logic signed [12:0] result,
  output logic              result_valid
);
  logic signed [12:0] c;
  logic               cv;

  sm_corr #(.ACC_W(12)) u_c (
    .clk(ec64clk), .rst_n, .en(1'b1), .din(demod_pkg::sm4_t'(ecdata)), .pn(ecpn),
    .wal(ecw), .valid(1'b1), .first(ecdump), .corr(c), .corr_valid(cv));

  always_ff @(posedge ec64clk or negedge rst_n) begin
    if (!rst_n) begin
      result       <= '0;
      result_valid <= 1'b0;
    end else if (ecrstdump) begin
      result       <= '0;
      result_valid <= 1'b0;
    end else if (cv) begin
      result       <= c;
      result_valid <= 1'b1;
    end
  end
endmodule

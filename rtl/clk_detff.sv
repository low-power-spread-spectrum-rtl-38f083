// clk_detff: the chain of dual-edge flip-flops that derives the chip's
// sampling and operating clocks from the selected clock.
//
// Each dual-edge flip-flop is clocked by both edges of the 128 MHz clock,
// so it delays its input by a quarter chip. The selected clock clkx passes
// one such stage to become CLK_ION_PN (control logic clock, never loses an
// edge); clkx AND killpulse_l passes one stage to become CLK_ION (on-time I
// sample, correlator clock), and each further stage adds a quarter chip:
// CLK_QON (+1/4 chip), CLK_IOFF (+1/2 chip), CLK_QOFF (+3/4 chip).
// Here the clocks are represented by one-cycle strobes on the quarter-chip
// clock `clk` (one strobe per rising edge of the 64 MHz clock they stand
// for), and each dual-edge flip-flop becomes an ordinary flip-flop on that
// clock. The chain structure is the document's; the strobe form is this
// design's. Asynchronous active-low reset clears the chain.
module clk_detff (
  input  logic clk,
  input  logic rst_n,
  input  logic clkx,
  input  logic killpulse_l,
  output logic clk_ion_pn,
  output logic clk_ion,
  output logic clk_qon,
  output logic clk_ioff,
  output logic clk_qoff
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_ion_pn <= 1'b0;
      clk_ion    <= 1'b0;
      clk_qon    <= 1'b0;
      clk_ioff   <= 1'b0;
      clk_qoff   <= 1'b0;
    end else begin
      clk_ion_pn <= clkx;
      clk_ion    <= clkx && killpulse_l;
      clk_qon    <= clk_ion;
      clk_ioff   <= clk_qon;
      clk_qoff   <= clk_ioff;
    end
  end
endmodule

// datamux: turns the two interleaved ADC streams into four aligned
// 64 MHz sample streams ION, QON, IOFF and QOFF.
//
// The I stream carries on-time and off-time I samples alternately and the
// Q stream likewise, each at twice the chip rate; which sample is which
// only follows from the sampling clocks. The first register rank (R1)
// latches the I stream on the CLK_ION and CLK_IOFF strobes and the Q
// stream on CLK_QON and CLK_QOFF. The second and third ranks (R2/R3 in the
// document) then move the four samples of one chip together, and the last
// rank (R4) re-latches them on the chip clock CLK_ION_PN, so a whole chip
// appears at once, one chip after it was sampled. A chip whose CLK_ION edge
// was removed by the clock generator is flagged invalid (dvalid = 0), which
// stands for the lost correlator sample. A QOFF sample taken on the same
// clock as the chip clock is forwarded directly.
//
// Interface: clk = quarter-chip clock; iin/qin = the two streams, held
// for at least one quarter; strobes from clk_detff. Outputs change right
// after the clk_ion_pn strobe. Function from the document; the rank
// structure is simplified to capture-then-align.
module datamux (
  input  logic            clk,
  input  logic            rst_n,
  input  demod_pkg::sm4_t iin,
  input  demod_pkg::sm4_t qin,
  input  logic            clk_ion_pn,
  input  logic            clk_ion,
  input  logic            clk_qon,
  input  logic            clk_ioff,
  input  logic            clk_qoff,
  output demod_pkg::sm4_t ion,
  output demod_pkg::sm4_t qon,
  output demod_pkg::sm4_t ioff,
  output demod_pkg::sm4_t qoff,
  output logic            dvalid
);
  import demod_pkg::*;
  sm4_t r1_ion, r1_qon, r1_ioff, r1_qoff;
  logic r1_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_ion <= '0; r1_qon <= '0; r1_ioff <= '0; r1_qoff <= '0;
      r1_v   <= 1'b0;
      ion <= '0; qon <= '0; ioff <= '0; qoff <= '0;
      dvalid <= 1'b0;
    end else begin
      if (clk_ion_pn) begin
        ion    <= r1_ion;
        qon    <= r1_qon;
        ioff   <= r1_ioff;
        qoff   <= clk_qoff ? qin : r1_qoff;
        dvalid <= r1_v;
        r1_v   <= clk_ion;   // set only if this chip's on-time edge exists
      end
      if (clk_ion)  r1_ion  <= iin;
      if (clk_qon)  r1_qon  <= qin;
      if (clk_ioff) r1_ioff <= iin;
      if (clk_qoff) r1_qoff <= qin;
    end
  end
endmodule

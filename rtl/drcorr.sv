// drcorr: data recovery correlator pair.
//
// The on-time I and Q samples are despread with the on-time PN chip and
// the user's Walsh chip and summed over one 64-chip symbol by two sm_corr
// instances, giving the 10-bit signed symbol values I_acc and Q_acc that
// feed the DQPSK decoder at 1 Msymbol/s.
//
// Interface: en = chip enable; blk_first marks chip 0 of each symbol (Walsh
// count 0). i_acc/q_acc update with dump64 (high for one enabled clock) two
// chips after the symbol ends, and hold. Follows the document's data
// recovery block; the output timing is this design's.
module drcorr (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  demod_pkg::sm4_t                   ion,
  input  demod_pkg::sm4_t                   qon,
  input  logic                              pn,
  input  logic                              wal,
  input  logic                              valid,
  input  logic                              blk_first,
  output logic signed [demod_pkg::SHORT_W-1:0] i_acc,
  output logic signed [demod_pkg::SHORT_W-1:0] q_acc,
  output logic                              dump64
);
  logic vi, vq;
  sm_corr #(.ACC_W(demod_pkg::SHORT_W-1)) u_i (
    .clk, .rst_n, .en, .din(ion), .pn, .wal, .valid, .first(blk_first),
    .corr(i_acc), .corr_valid(vi));
  sm_corr #(.ACC_W(demod_pkg::SHORT_W-1)) u_q (
    .clk, .rst_n, .en, .din(qon), .pn, .wal, .valid, .first(blk_first),
    .corr(q_acc), .corr_valid(vq));
  assign dump64 = vi;
  assert property (@(posedge clk) disable iff (!rst_n) vi == vq) else $error("I/Q data correlators out of step");
endmodule

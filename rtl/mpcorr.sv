// mpcorr: multipath (long) correlator with its back end.
//
// One of four identical correlators used for coarse lock acquisition and,
// after lock, as multipath energy estimators. The I and Q on-time samples
// are correlated with the correlator's PN tap (on-time or delayed 1..3
// chips) over 1024 chips as 16 absolute 64-chip results (pilot_energy).
// The back end adds the two 13-bit magnitudes into the 14-bit energy
// estimate |I|+|Q|, compares it with threshold register A, and drives
// cmpth_l low when energy >= threshold. A mux selects I+Q before lock and
// I alone after lock onto ipq_or_i; ipq_or_i and q are registered.
//
// Interface: en = chip enable; blk_first/frame_first frame the windows
// (see pilot_energy). cmpth_l and the outputs update with out_valid, once
// per frame, a few chips after chip 1024 of the frame, and hold until the
// next update; the update controller samples cmpth_l at frame chip 1087.
// The structure and widths follow the document's multipath correlator
// figure; cmpth_l resets to 1 (no lock) by this design's choice.
module mpcorr (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  demod_pkg::sm4_t                   ion,
  input  demod_pkg::sm4_t                   qon,
  input  logic                              pn,
  input  logic                              valid,
  input  logic                              blk_first,
  input  logic                              frame_first,
  input  logic                              lock,
  input  logic [demod_pkg::THRA_W-1:0]      thresa,
  output logic                              cmpth_l,
  output logic [demod_pkg::THRA_W-1:0]      ipq_or_i,
  output logic [demod_pkg::LONG_W-1:0]      q,
  output logic                              out_valid
);
  import demod_pkg::*;
  logic [LONG_W-1:0] im, qm;
  logic              ev;
  logic [THRA_W-1:0] ipq;

  pilot_energy u_en (
    .clk, .rst_n, .en, .idata(ion), .qdata(qon), .pn, .valid,
    .blk_first, .frame_first, .i_mag(im), .q_mag(qm), .out_valid(ev));

  assign ipq = THRA_W'(im) + THRA_W'(qm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmpth_l   <= 1'b1;
      ipq_or_i  <= '0;
      q         <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= ev;
      if (ev) begin
        cmpth_l  <= !(ipq >= thresa);
        ipq_or_i <= lock ? THRA_W'(im) : ipq;
        q        <= qm;
      end
    end
  end
endmodule

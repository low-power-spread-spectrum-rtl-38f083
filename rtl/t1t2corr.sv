// t1t2corr: early/late pilot correlators and DPLL decision logic.
//
// The off-time samples (taken half a chip after the on-time ones) feed the
// "late" correlator directly and the "early" correlator after a one-chip
// delay, so the two sample the received chip half a chip after and half a
// chip before the on-time point. Both correlate with the on-time PN chip
// and produce 1024-chip pilot energies E = |I|+|Q| (14 bits each).
// The back end then forms:
//   t_reset      = (E_early + E_late) < THRESB   (too little energy: the
//                  lock state machine drops lock)
//   adjust       = |E_early - E_late| > THRESC   (worth moving the clock)
//   extend_phase = E_early < E_late              (sampling too early: delay
//                  the sampling clock by a quarter chip; otherwise advance)
// change_phase_l = !adjust goes to the clock generator, which acts on it
// only when the update controller's valid_data strobe is high.
//
// Interface: en = chip enable; framing inputs as in pilot_energy; outputs
// update with out_valid once per frame and hold. The compares and their
// meaning follow the document; t_reset and change_phase_l reset to the
// harmless values 0 and 1 by this design's choice.
module t1t2corr (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  demod_pkg::sm4_t                   ioff,
  input  demod_pkg::sm4_t                   qoff,
  input  logic                              pn,
  input  logic                              valid,
  input  logic                              blk_first,
  input  logic                              frame_first,
  input  logic [demod_pkg::THRB_W-1:0]      thresb,
  input  logic [demod_pkg::THRC_W-1:0]      thresc,
  output logic                              t_reset,
  output logic                              change_phase_l,
  output logic                              extend_phase,
  output logic [demod_pkg::THRA_W-1:0]      e_early,
  output logic [demod_pkg::THRA_W-1:0]      e_late,
  output logic                              out_valid
);
  import demod_pkg::*;
  sm4_t              ioff_d, qoff_d;
  logic              valid_d;
  logic [LONG_W-1:0] ei, eq, li, lq;
  logic              ev, lv;
  logic [THRA_W-1:0] ee, el;
  logic [THRB_W-1:0] esum;
  logic signed [THRA_W:0] ediff;
  logic [THRA_W:0]   eabs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ioff_d  <= '0;
      qoff_d  <= '0;
      valid_d <= 1'b0;
    end else if (en) begin
      ioff_d  <= ioff;
      qoff_d  <= qoff;
      valid_d <= valid;
    end
  end

  pilot_energy u_early (
    .clk, .rst_n, .en, .idata(ioff_d), .qdata(qoff_d), .pn, .valid(valid_d),
    .blk_first, .frame_first, .i_mag(ei), .q_mag(eq), .out_valid(ev));
  pilot_energy u_late (
    .clk, .rst_n, .en, .idata(ioff), .qdata(qoff), .pn, .valid,
    .blk_first, .frame_first, .i_mag(li), .q_mag(lq), .out_valid(lv));

  assign ee    = THRA_W'(ei) + THRA_W'(eq);
  assign el    = THRA_W'(li) + THRA_W'(lq);
  assign esum  = THRB_W'(ee) + THRB_W'(el);
  assign ediff = $signed({1'b0, ee}) - $signed({1'b0, el});
  assign eabs  = ediff[THRA_W] ? (THRA_W+1)'(-ediff) : ediff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_reset        <= 1'b0;
      change_phase_l <= 1'b1;
      extend_phase   <= 1'b0;
      e_early        <= '0;
      e_late         <= '0;
      out_valid      <= 1'b0;
    end else if (en) begin
      out_valid <= ev;
      if (ev) begin
        e_early        <= ee;
        e_late         <= el;
        t_reset        <= esum < thresb;
        change_phase_l <= !(THRC_W'(eabs) > thresc);
        extend_phase   <= ediff[THRA_W];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ev == lv) else $error("early/late results out of step");
endmodule

// pilot_energy: long pilot-tone correlation with per-symbol magnitudes.
//
// An I and a Q sm_corr correlate the sample pair with a PN chip (Walsh code
// 0, the pilot) over 64-chip windows. The absolute value of every window
// result is added into a 13-bit accumulator per rail, and after NBLK
// windows (16, i.e. 1024 chips) the two sums are latched as i_mag/q_mag.
// Taking the magnitude every 64 chips keeps the slow constellation rotation
// caused by oscillator offset (about 8 degrees per symbol) from cancelling
// the 1024-chip sum, at the price of losing phase.
//
// Interface: en = chip enable; blk_first marks the first chip of each
// 64-chip window, frame_first the first chip of a frame. Windows are
// counted from frame_first; the first NBLK windows of a frame are summed
// and any later window of the same frame is ignored (the frame is 17
// windows long, the 17th leaves time for the compare). out_valid is high
// for one enabled clock when i_mag/q_mag are updated, about two chips after
// the NBLK-th window ends. Counting windows from the frame start is this
// design's choice; the document gives the sums and widths.
module pilot_energy #(
  parameter int unsigned NBLK  = demod_pkg::LONG_SYMBOLS,
  parameter int unsigned LW    = demod_pkg::LONG_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  demod_pkg::sm4_t     idata,
  input  demod_pkg::sm4_t     qdata,
  input  logic                pn,
  input  logic                valid,
  input  logic                blk_first,
  input  logic                frame_first,
  output logic [LW-1:0]       i_mag,
  output logic [LW-1:0]       q_mag,
  output logic                out_valid
);
  localparam int unsigned SW = demod_pkg::SHORT_W;

  logic signed [SW-1:0] ci, cq;
  logic                 ci_v, cq_v;
  logic [2:0]           ff_pipe;      // frame_first aligned with corr_valid
  logic [LW-1:0]        acc_i, acc_q;
  logic [$clog2(NBLK+1)-1:0] nblk;
  logic [SW-2:0]        abs_i, abs_q;

  sm_corr #(.ACC_W(SW-1)) u_ci (
    .clk, .rst_n, .en, .din(idata), .pn, .wal(1'b0), .valid,
    .first(blk_first), .corr(ci), .corr_valid(ci_v));
  sm_corr #(.ACC_W(SW-1)) u_cq (
    .clk, .rst_n, .en, .din(qdata), .pn, .wal(1'b0), .valid,
    .first(blk_first), .corr(cq), .corr_valid(cq_v));

  assign abs_i = ci[SW-1] ? (SW-1)'(-ci) : ci[SW-2:0];
  assign abs_q = cq[SW-1] ? (SW-1)'(-cq) : cq[SW-2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_pipe   <= '0;
      acc_i     <= '0;
      acc_q     <= '0;
      nblk      <= '0;
      i_mag     <= '0;
      q_mag     <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      ff_pipe   <= {ff_pipe[1:0], frame_first && blk_first};
      out_valid <= 1'b0;
      if (ci_v) begin
        if (ff_pipe[2]) begin
          // result of the window that ended the previous frame: discard
          acc_i <= '0;
          acc_q <= '0;
          nblk  <= '0;
        end else if (32'(nblk) < NBLK) begin
          acc_i <= acc_i + LW'(abs_i);
          acc_q <= acc_q + LW'(abs_q);
          nblk  <= nblk + 1'b1;
          if (32'(nblk) == NBLK - 1) begin
            i_mag     <= acc_i + LW'(abs_i);
            q_mag     <= acc_q + LW'(abs_q);
            out_valid <= 1'b1;
          end
        end
      end
    end
  end

  // both rails share the same control, so their results coincide
  assert property (@(posedge clk) disable iff (!rst_n) ci_v == cq_v) else $error("I/Q correlator results out of step");
endmodule

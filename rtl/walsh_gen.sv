// walsh_gen: 64-chip Walsh sequence generator for one user.
//
// Works as in the original design: a 6-bit chip counter runs through a
// Gray code, the difference between successive Gray codes marks the single
// bit that changed, the AND-OR of that difference with the user's Walsh
// number drives a toggle flip-flop, and the toggle flip-flop output is the
// Walsh chip. The result is walshout = parity(walshnum & gray(walshcnt)),
// so Walsh number 0 is the all-(+1) pilot code. The counter is built from
// per-bit toggles (bit i toggles when all lower bits are one), the counter
// style the document uses to keep the critical path short.
//
// Interface: en = chip enable; stall_l = 0 holds the state for the chip
// (driven together with the PN stall); pn_allones_l = 0 marks the last
// chip of the PN period, and on the next chip the generator restarts at
// count 0 so Walsh symbols stay aligned to the PN sequence. walshcnt is the
// current count (symbol chip index). Reset (asynchronous, active low) sets
// count 0 and output 0; the reset state and the exact output phase are this
// design's choice: the document's example table shows the same sequence
// delayed by one chip.
module walsh_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       stall_l,
  input  logic       pn_allones_l,
  input  logic [5:0] walshnum,
  output logic       walshout,
  output logic [5:0] walshcnt
);
  logic [5:0] cnt, cnt_nxt, tgl, gray_cur, gray_nxt, diff;
  logic       tff, tff_in;

  // per-bit toggle counter
  assign tgl     = {&cnt[4:0], &cnt[3:0], &cnt[2:0], &cnt[1:0], cnt[0], 1'b1};
  assign cnt_nxt = cnt ^ tgl;

  assign gray_cur = cnt ^ (cnt >> 1);
  assign gray_nxt = cnt_nxt ^ (cnt_nxt >> 1);
  assign diff     = gray_cur ^ gray_nxt;
  assign tff_in   = |(walshnum & diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      tff <= 1'b0;
    end else if (en && stall_l) begin
      if (!pn_allones_l) begin
        cnt <= '0;
        tff <= 1'b0;
      end else begin
        cnt <= cnt_nxt;
        tff <= tff ^ tff_in;
      end
    end
  end

  assign walshout = tff;
  assign walshcnt = cnt;
endmodule

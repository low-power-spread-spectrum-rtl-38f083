// updctrl: update controller, the sequencer of the demodulator.
//
// An 11-bit frame counter counts the chips that are not stalled from 0 to
// 1087 (17 symbols of 64 chips). It frames all correlators:
//   blk_first   chip 0 of every 64-chip symbol (frame count mod 64 == 0)
//   frame_first chip 0 of the frame
//   upd63       last chip of every symbol
//   dump1024    chip 1023, end of the 16 symbols of a long correlation
//   valid_data  chip 1087 (UPD1087): correlator flags and DPLL decisions
//               are valid and are acted on
// Because the counter only advances together with the PN and Walsh
// generators, the frame count mod 64 always equals the Walsh count and
// symbol boundaries stay on PN/Walsh boundaries.
//
// Coarse acquisition: in ACQ, at valid_data the four correlator flags c_l
// are checked. If correlator k (lowest k first) reached threshold A the PN
// and Walsh generators are stalled k chips, which makes correlator 0 the
// on-time one, and the controller moves to LOCKED. If none did, they are
// stalled 4 chips, sliding all four correlators to the next four code
// phases, and the search goes on. Stalled chips are excluded from the
// correlations (pnstall_l also gates the samples), so every frame starts
// clean. In LOCKED the same framing continues; when the lock state machine
// drops lock the controller returns to ACQ and searches from where it is.
//
// Interface: en = chip enable. pnstall_l is decoded from the state
// register; the strobes are decoded from the counter and already qualified
// with pnstall_l. updstbits exposes the state. The frame length, the stall
// rule and the counter come from the document; the exact state set, and
// taking the lowest-numbered correlator when several reach threshold, are
// this design's.
module updctrl #(
  parameter int unsigned FRAME   = demod_pkg::FRAME_CHIPS,
  parameter int unsigned LONGEND = demod_pkg::LONG_SYMBOLS * demod_pkg::SYMBOL_CHIPS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [3:0]  c_l,
  input  logic        lock,
  output logic        valid_data,
  output logic        dump1024,
  output logic        upd63,
  output logic        blk_first,
  output logic        frame_first,
  output logic        pnstall_l,
  output logic        stall_search,   // a 4-chip search stall is running
  output logic [2:0]  updstbits,
  output logic [10:0] frame_cnt
);
  typedef enum logic [2:0] {
    U_RESET      = 3'd0,
    U_ACQ        = 3'd1,
    U_STALL_SRCH = 3'd2,
    U_STALL_LOCK = 3'd3,
    U_LOCKED     = 3'd4
  } upd_st_e;

  upd_st_e     st;
  logic [10:0] fc;
  logic [2:0]  stall_cnt;
  logic        hit;
  logic [1:0]  hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = 2'd0;
    for (int k = 3; k >= 0; k--) begin
      if (!c_l[k]) begin
        hit     = 1'b1;
        hit_idx = 2'(k);
      end
    end
  end

  assign pnstall_l    = !(st == U_STALL_SRCH || st == U_STALL_LOCK || st == U_RESET);
  assign stall_search = (st == U_STALL_SRCH);
  assign valid_data   = pnstall_l && (fc == 11'(FRAME - 1));
  assign dump1024     = pnstall_l && (fc == 11'(LONGEND - 1));
  assign upd63        = pnstall_l && (fc[5:0] == 6'd63);
  assign blk_first    = pnstall_l && (fc[5:0] == 6'd0);
  assign frame_first  = pnstall_l && (fc == 11'd0);
  assign updstbits    = st;
  assign frame_cnt    = fc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= U_RESET;
      fc        <= '0;
      stall_cnt <= '0;
    end else if (en) begin
      if (pnstall_l) fc <= (fc == 11'(FRAME - 1)) ? 11'd0 : fc + 11'd1;
      unique case (st)
        // one chip after reset so that no stale pipelined value is used
        U_RESET: st <= U_ACQ;
        U_ACQ: if (valid_data) begin
          if (hit) begin
            stall_cnt <= {1'b0, hit_idx};
            st        <= (hit_idx == 2'd0) ? U_LOCKED : U_STALL_LOCK;
          end else begin
            stall_cnt <= 3'd4;
            st        <= U_STALL_SRCH;
          end
        end
        U_STALL_SRCH: begin
          stall_cnt <= stall_cnt - 3'd1;
          if (stall_cnt == 3'd1) st <= U_ACQ;
        end
        U_STALL_LOCK: begin
          stall_cnt <= stall_cnt - 3'd1;
          if (stall_cnt == 3'd1) st <= U_LOCKED;
        end
        U_LOCKED: if (!lock) st <= U_ACQ;
        default: st <= U_ACQ;
      endcase
    end
  end
endmodule

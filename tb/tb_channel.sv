// tb_channel: transmitter and channel model for the demodulator testbenches.
//
// Builds the base-station signal chip by chip, independently of the RTL:
//   I = AP*p + AU*p*w*sI + ANB*p_nb,   Q = AU*p*w*sQ
// where p is the pilot PN chip (+1/-1), w the user's Walsh chip, (sI, sQ)
// the current DQPSK symbol (one of (1,0), (0,1), (-1,0), (0,-1)) and p_nb a
// neighbour cell's pilot, NB_PHASE chips behind. NOTHER further users of
// amplitude AO, on Walsh codes WALSH+7, WALSH+14, ... (mod 64), each with
// its own random QPSK symbol per 64 chips, add to both rails. With DRIFT_Q
// > 0 the transmitter's chip clock runs fast: every DRIFT_Q clocks it moves
// on by one extra quarter chip, a chip-rate offset of 1/DRIFT_Q (DRIFT_Q =
// 50000 is 20 ppm). The PN sequence is
// precomputed from the LFSR rule (taps 15, 13, 4, 0, 32768 chips ending on
// all ones). Chip k of the transmitter uses PN index (k + K0) mod 32768 and
// lasts four quarter-chip clocks; the ADC model presents the chip covering
// the current quarter on both streams (rectangular chips). A new random
// dibit starts at every PN index multiple of 64; it is reported on
// sym_stb/sym_bits/sym_num.
module tb_channel #(
  parameter int K0       = 0,
  parameter int WALSH    = 5,
  parameter int AP       = 3,
  parameter int AU       = 2,
  parameter int ANB      = 1,
  parameter int NB_PHASE = 5,
  parameter int NOTHER   = 0,
  parameter int AO       = 1,
  parameter int DRIFT_Q  = 0
) (
  input  logic       clk,
  input  logic       run,
  input  logic       sig_on,
  output logic [3:0] iin,
  output logic [3:0] qin,
  output logic       sym_stb,
  output logic [1:0] sym_bits,
  output int         sym_num
);
  bit    pnseq [32768];
  int    q;          // quarter count
  int    kcur;       // transmitter chip on the ADC outputs
  int    dtick;      // clocks since the last extra quarter
  int    n_skip;     // extra quarters so far
  int    ph;         // DQPSK phase in quarter turns
  int    ci, cq;
  int    osi [8], osq [8];   // other users' current symbols

  function automatic bit walsh_chip(int wn, int idx);
    int g;
    g = idx ^ (idx >> 1);
    return ^(6'(wn) & 6'(g));
  endfunction

  function automatic logic [3:0] to_sm(int v);
    int a;
    a = (v < 0) ? -v : v;
    if (a > 7) a = 7;
    return {v < 0, 3'(a)};
  endfunction

  initial begin
    logic [15:0] s;
    s = 16'h2A88;
    for (int i = 0; i < 32768; i++) begin
      pnseq[i] = s[0];
      s = {s[15] ^ s[13] ^ s[4] ^ s[0], s[15:1]};
    end
    if (s != 16'h2A88 && pnseq[32767] != 1'b1) $display("tb_channel: PN table check failed");
    q = 0; kcur = -1; dtick = 0; n_skip = 0; ph = 0; ci = 0; cq = 0;
    sym_stb = 0; sym_bits = 0; sym_num = 0;
    iin = 0; qin = 0;
  end

  always @(posedge clk) begin
    sym_stb <= 1'b0;
    if (run) begin
      if (q / 4 != kcur) begin
        int k, idx, p, w, pnb, si, sq, dib;
        k    = q / 4;
        kcur = k;
        idx = (k + K0) % 32768;
        p   = pnseq[idx] ? -1 : 1;
        w   = walsh_chip(WALSH, idx % 64) ? -1 : 1;
        pnb = pnseq[(idx + 32768 - NB_PHASE) % 32768] ? -1 : 1;
        if (idx % 64 == 0) begin
          dib = int'($urandom_range(0, 3));
          // 00 -> 0, 01 -> +90, 11 -> +180, 10 -> +270 degrees
          case (dib)
            0: ph = ph;
            1: ph = ph + 1;
            3: ph = ph + 2;
            default: ph = ph + 3;
          endcase
          ph = ph % 4;
          sym_stb  <= 1'b1;
          sym_bits <= 2'(dib);
          sym_num  <= sym_num + 1;
        end
        case (ph)
          0: begin si = 1;  sq = 0;  end
          1: begin si = 0;  sq = 1;  end
          2: begin si = -1; sq = 0;  end
          default: begin si = 0; sq = -1; end
        endcase
        ci = AP * p + AU * p * w * si + ANB * pnb;
        cq = AU * p * w * sq;
        for (int u = 0; u < NOTHER && u < 8; u++) begin
          int wo;
          if (idx % 64 == 0) begin
            osi[u] = ($urandom_range(0, 1) != 0) ? 1 : -1;
            osq[u] = ($urandom_range(0, 1) != 0) ? 1 : -1;
          end
          wo = walsh_chip((WALSH + 7 * (u + 1)) % 64, idx % 64) ? -1 : 1;
          ci += AO * p * wo * osi[u];
          cq += AO * p * wo * osq[u];
        end
        if (!sig_on) begin ci = 0; cq = 0; end
        iin <= to_sm(ci);
        qin <= to_sm(cq);
      end
      if (DRIFT_Q > 0 && dtick == DRIFT_Q - 1) begin
        q <= q + 2;
        dtick <= 0;
        n_skip <= n_skip + 1;
      end else begin
        q <= q + 1;
        if (DRIFT_Q > 0) dtick <= dtick + 1;
      end
    end
  end
endmodule

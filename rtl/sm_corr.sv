// sm_corr: sign-magnitude carry-save correlator (one half of an I/Q pair).
//
// Each chip a 4-bit sign-magnitude sample is multiplied by a PN chip and a
// Walsh chip, which only flips its sign bit, and latched. Its magnitude is
// then added into one of two accumulators: POSACC for positive products,
// NEGACC for negative ones; the other accumulator holds (in the original
// chip its clock is gated off to save power). Each accumulator is a
// carry-save adder: a SUM and a CARRY vector are kept and every bit slice
// is a full adder followed by registers, so no carry ripples within a chip.
// At the end of a window the SUM/CARRY vectors are dumped into holding
// registers and a slow back end forms (S+2C)pos - (S+2C)neg with ordinary
// adders; this back end has a whole window to finish.
//
// Interface: en = chip enable; din/pn/wal/valid/first arrive together for
// one chip. valid = 0 drops the sample (a killed clock edge or a stalled
// chip). first = 1 marks the first chip of a new window: the previous
// window is dumped and the accumulators restart with this chip. The signed
// result corr appears with corr_valid two enabled clocks after the `first`
// chip and holds until the next result. ACC_W = 9 holds 64 chips of
// magnitude 7 (448); the result is ACC_W+1 bits in two's complement. The
// document gives the structure and widths; the exact pipeline depth here is
// this design's.
module sm_corr #(
  parameter int unsigned ACC_W = 9
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  demod_pkg::sm4_t          din,
  input  logic                     pn,
  input  logic                     wal,
  input  logic                     valid,
  input  logic                     first,
  output logic signed [ACC_W:0]    corr,
  output logic                     corr_valid
);
  // stage 1: input latch with sign flipped by PN and Walsh
  logic             s1_sign, s1_first;
  logic [2:0]       s1_mag;
  // stage 2: carry-save accumulators
  logic [ACC_W-1:0] ps, pc, ns, nc;
  logic [ACC_W-1:0] dps, dpc, dns, dnc;
  logic             dump_q;
  logic [ACC_W-1:0] d_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_sign  <= 1'b0;
      s1_mag   <= '0;
      s1_first <= 1'b0;
    end else if (en) begin
      s1_sign  <= din.sign ^ pn ^ wal;
      s1_mag   <= valid ? din.mag : 3'd0;
      s1_first <= first;
    end
  end

  assign d_ext = ACC_W'(s1_mag);

  function automatic logic [2*ACC_W-1:0] csa_add(logic [ACC_W-1:0] s, logic [ACC_W-1:0] c,
                                                 logic [ACC_W-1:0] d);
    logic [ACC_W-1:0] c2, so, co;
    c2 = c << 1;
    so = s ^ c2 ^ d;
    co = (s & c2) | (s & d) | (c2 & d);
    return {co, so};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= '0; pc <= '0; ns <= '0; nc <= '0;
      dps <= '0; dpc <= '0; dns <= '0; dnc <= '0;
      dump_q <= 1'b0;
    end else if (en) begin
      dump_q <= s1_first;
      if (s1_first) begin
        dps <= ps; dpc <= pc; dns <= ns; dnc <= nc;
        if (s1_sign) begin
          ps <= '0;    pc <= '0;
          ns <= d_ext; nc <= '0;
        end else begin
          ps <= d_ext; pc <= '0;
          ns <= '0;    nc <= '0;
        end
      end else if (s1_sign) begin
        {nc, ns} <= csa_add(ns, nc, d_ext);
      end else begin
        {pc, ps} <= csa_add(ps, pc, d_ext);
      end
    end
  end

  // stage 3: back end, resolve carry-save pairs and subtract
  logic [ACC_W-1:0] pos_sum, neg_sum;
  assign pos_sum = dps + (dpc << 1);
  assign neg_sum = dns + (dnc << 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr       <= '0;
      corr_valid <= 1'b0;
    end else if (en) begin
      corr_valid <= dump_q;
      if (dump_q) corr <= $signed({1'b0, pos_sum}) - $signed({1'b0, neg_sum});
    end
  end
endmodule

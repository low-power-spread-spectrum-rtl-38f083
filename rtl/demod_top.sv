// demod_top: direct-sequence CDMA demodulator back end.
//
// The receiver gets two ADC streams (I and Q, 4-bit sign-magnitude, each
// at twice the 64 Mchip/s chip rate) and must find the base station's
// pilot code phase, keep its sampling clock centred on the chips, despread
// the user's channel and decode DQPSK symbols at 1 Msymbol/s, while also
// scanning for neighbouring base stations. Blocks and data flow:
//
//   testmode -> datamux -> ION/QON ---> mpcorr x4 (PN taps 0..3) -> lock
//                      \              \-> drcorr (PN x Walsh) -> dqpsk_dec
//                       \             \-> acs (own PN, all phases)
//                        -> IOFF/QOFF -> t1t2corr (early/late) -> DPLL
//   clkgen -> clk_detff -> sampling strobes and chip enable
//   pn_gen, walsh_gen, updctrl, lock_fsm, regblk: timing and control
//   extracorr (own pins), osb (observation bus)
//
// Coarse acquisition: four long correlators test four adjacent code phases
// per 1088-chip frame; if none reaches threshold A, the PN generator is
// stalled four chips and the next four phases are tried; when one does,
// the PN generator is stalled 0..3 chips to make correlator 0 on time and
// LOCK rises. In lock, the early/late correlators compare pilot energy
// half a chip either side of the on-time sample once per frame and the
// clock generator moves the sampling phase by a quarter chip towards the
// larger one; too little early+late energy drops lock.
//
// Clocking: everything runs on one clock `clk` whose period is a quarter
// chip (the two edges of the 128 MHz oscillator). The selected 64 MHz
// clock of the original design is a one-cycle strobe (chip_en, CLK_ION_PN)
// that enables all chip-rate logic; a removed correlator edge is a sample
// marked invalid. The extra correlator runs on its own clock ec64clk.
// Port names follow the original pin list where one exists; the DQPSK bit
// outputs, the neighbour-scan results, clk8 and chip_en are additions.
module demod_top #(
  parameter int unsigned ACS_NPHASE = demod_pkg::PN_LEN,        // phases scanned
  parameter int unsigned ACS_NBLK   = demod_pkg::LONG_SYMBOLS   // symbols per phase
) (
  input  logic                 clk,          // quarter-chip clock (both OSC edges)
  input  logic                 clkrst,       // CLKRST: clock generator reset
  input  logic                 rst_n,        // RESETL
  input  demod_pkg::tstmode_e  tstmode,      // TSTMODE
  input  logic [3:0]           iin,          // IIN
  input  logic [3:0]           qin,          // QIN
  input  logic [3:0]           iinx,         // IINX (test)
  input  logic [3:0]           qinx,         // QINX (test)
  input  logic [14:0]          datain,       // DATAIN register bus
  input  demod_pkg::reg_addr_e addr,         // ADDR
  input  logic                 csl,          // CSL
  input  logic                 wrl,          // WRL
  input  logic [2:0]           omode,        // OMODE
  output logic [27:0]          odata,        // ODATA
  output logic                 lock,         // LOCK
  output logic                 stall_l,      // STALLL: PN generator stalled
  output logic                 stretchsamp,  // 1: last phase step was +T/4
  output logic                 cmp_adjust,   // phase of clock adjusted (CMPTH3)
  output logic                 cmp_energy,   // enough energy to stay in lock (CMPTH2)
  output logic                 dumprst,      // long correlators restarted
  output logic                 dump64h,      // data correlator output valid
  output logic                 dump1024h,    // long correlator outputs valid
  output logic                 chip_en,      // QCLK: chip clock strobe
  output logic                 clk8,         // 8 MHz clock from Walsh count bit 2
  // extra correlator pins
  input  logic                 ec64clk,
  input  logic [3:0]           ecdata,
  input  logic                 ecpn,
  input  logic                 ecw,
  input  logic                 ecdump,
  input  logic                 ecrstdump,
  // decoded user data
  output logic [1:0]           dq_bits,      // {bit_(n+1), bit_n}
  output logic                 dq_valid,     // one chip_en strobe per symbol
  // adjacent cell scan results
  output logic [13:0]          rssi_e [3],
  output logic [14:0]          rssi_p [3],
  output logic                 rssi_new
);
  import demod_pkg::*;

  // ---------------- clocks ----------------
  logic       clkx, killpulse_l, ext_l, shr_l;
  logic [3:0] sel_clk_l;
  logic [1:0] qc, idx, qphase;
  logic       s_ion, s_qon, s_ioff, s_qoff;
  logic       valid_data, extend_phase, change_phase_l;

  clkgen u_clkgen (
    .clk, .clkrst, .rst_n, .valid_data, .extend_phase, .change_phase_l, .lock,
    .clkx, .killpulse_l, .sel_clk_l, .ext_l, .shr_l, .qc);

  clk_detff u_detff (
    .clk, .rst_n, .clkx, .killpulse_l, .clk_ion_pn(chip_en), .clk_ion(s_ion),
    .clk_qon(s_qon), .clk_ioff(s_ioff), .clk_qoff(s_qoff));

  always_comb begin
    unique case (sel_clk_l)
      4'b1011: idx = 2'd1;
      4'b1101: idx = 2'd2;
      4'b1110: idx = 2'd3;
      default: idx = 2'd0;
    endcase
  end
  // quarter position after the selected edge: ION at 1, QON 2, IOFF 3, QOFF 0
  assign qphase = qc - idx;

  // ---------------- input data ----------------
  sm4_t i_str, q_str, ion, qon, ioff, qoff;
  logic dvalid;

  testmode u_testmode (
    .tstmode, .odd_i(qphase[1]), .odd_q(qphase == 2'd3 || qphase == 2'd0),
    .iin, .qin, .iinx, .qinx, .iout(i_str), .qout(q_str));

  datamux u_datamux (
    .clk, .rst_n, .iin(i_str), .qin(q_str), .clk_ion_pn(chip_en), .clk_ion(s_ion),
    .clk_qon(s_qon), .clk_ioff(s_ioff), .clk_qoff(s_qoff),
    .ion, .qon, .ioff, .qoff, .dvalid);

  // ---------------- codes and control ----------------
  logic        pn0, pn1, pn2, pn3, pn_allones_l, walshout, pnstall_l;
  logic [5:0]  walshcnt, walshnum;
  logic [15:0] pn_state;
  logic [THRA_W-1:0] thresa;
  logic [THRB_W-1:0] thresb;
  logic [THRC_W-1:0] thresc;
  logic        blk_first, frame_first, upd63, stall_search;
  logic [2:0]  updstbits;
  logic [10:0] frame_cnt;
  logic [3:0]  c_l;
  logic        t_reset, lockrst;
  logic [1:0]  lockstbits;
  logic        svalid;

  regblk u_regblk (
    .clk, .rst_n, .en(chip_en), .pn_allones_l, .csl, .wrl, .addr, .datain,
    .walshnum, .thresa, .thresb, .thresc);

  pn_gen u_pn (
    .clk, .rst_n, .en(chip_en), .stall_l(pnstall_l), .reload(1'b0),
    .pn_out(pn0), .pn_out1d(pn1), .pn_out2d(pn2), .pn_out3d(pn3),
    .pn_allones_l, .pn_state);

  walsh_gen u_walsh (
    .clk, .rst_n, .en(chip_en), .stall_l(pnstall_l), .pn_allones_l, .walshnum,
    .walshout, .walshcnt);

  updctrl u_upd (
    .clk, .rst_n, .en(chip_en), .c_l, .lock, .valid_data, .dump1024(dump1024h),
    .upd63, .blk_first, .frame_first, .pnstall_l, .stall_search, .updstbits,
    .frame_cnt);

  lock_fsm u_lock (
    .clk, .rst_n, .en(chip_en), .valid_data, .c_l, .t_reset, .lock, .lockrst,
    .lockstbits);

  // stalled chips and chips with a removed correlator edge are not summed
  assign svalid = dvalid && pnstall_l;

  // ---------------- correlators ----------------
  logic [THRA_W-1:0] mp_ipq [4];
  logic [LONG_W-1:0] mp_q   [4];
  logic [3:0]        mp_v;
  logic [3:0]        pn_tap;
  assign pn_tap = {pn3, pn2, pn1, pn0};

  for (genvar k = 0; k < 4; k++) begin : g_mp
    mpcorr u_mp (
      .clk, .rst_n, .en(chip_en), .ion, .qon, .pn(pn_tap[k]), .valid(svalid),
      .blk_first, .frame_first, .lock, .thresa, .cmpth_l(c_l[k]),
      .ipq_or_i(mp_ipq[k]), .q(mp_q[k]), .out_valid(mp_v[k]));
  end

  logic [THRA_W-1:0] e_early, e_late;
  logic              el_v;
  t1t2corr u_t1t2 (
    .clk, .rst_n, .en(chip_en), .ioff, .qoff, .pn(pn0), .valid(svalid),
    .blk_first, .frame_first, .thresb, .thresc, .t_reset, .change_phase_l,
    .extend_phase, .e_early, .e_late, .out_valid(el_v));

  logic signed [SHORT_W-1:0] i_acc, q_acc;
  logic                      dr_v;
  drcorr u_dr (
    .clk, .rst_n, .en(chip_en), .ion, .qon, .pn(pn0), .wal(walshout),
    .valid(svalid), .blk_first, .i_acc, .q_acc, .dump64(dr_v));

  logic dq_v;
  dqpsk_dec u_dq (
    .clk, .rst_n, .en(chip_en), .in_valid(dr_v), .i_in(i_acc), .q_in(q_acc),
    .bits(dq_bits), .out_valid(dq_v));

  logic acs_scanning;
  acs #(.NPHASE(ACS_NPHASE), .NBLK(ACS_NBLK)) u_acs (
    .clk, .rst_n, .en(chip_en), .ion, .qon, .valid(dvalid), .lock, .pn_allones_l,
    .rssi_e, .rssi_p, .rssi_new, .scanning(acs_scanning));

  logic signed [12:0] ec_result;
  logic               ec_valid;
  extracorr u_ec (
    .ec64clk, .rst_n, .ecdata, .ecpn, .ecw, .ecdump, .ecrstdump,
    .result(ec_result), .result_valid(ec_valid));

  // ---------------- observation bus ----------------
  logic [27:0] words [8];
  always_comb begin
    for (int k = 0; k < 4; k++) words[k] = {1'b0, mp_ipq[k], mp_q[k]};
    words[4] = {e_early, e_late};
    words[5] = {i_acc, q_acc, walshcnt, dq_bits};
    words[6] = {ec_valid, ec_result, lockrst, lockstbits, updstbits, sel_clk_l,
                acs_scanning, stall_search, mp_v[0], el_v};
    words[7] = {pn_state, frame_cnt, upd63};
  end

  osb u_osb (.clk, .rst_n, .en(chip_en), .omode, .words, .odata);

  // ---------------- status pins ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stretchsamp <= 1'b0;
      clk8        <= 1'b0;
    end else begin
      if (!ext_l && clkx)      stretchsamp <= 1'b1;
      else if (!shr_l && clkx) stretchsamp <= 1'b0;
      if (chip_en) clk8 <= walshcnt[2];
    end
  end

  assign stall_l    = pnstall_l;
  assign cmp_adjust = !change_phase_l;
  assign cmp_energy = !t_reset;
  assign dumprst    = frame_first;
  assign dump64h    = dr_v && chip_en;
  assign dq_valid   = dq_v && chip_en && lock;

  // symbol framing and Walsh counter always agree
  assert property (@(posedge clk) disable iff (!rst_n) walshcnt == frame_cnt[5:0])
    else $error("Walsh count and frame counter out of step");
endmodule

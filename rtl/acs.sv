// acs: adjacent cell scan.
//
// Every base station sends the same 32768-chip pilot PN sequence, each
// with its own code phase, so correlating the received signal with the
// pilot at every phase shows which base stations are near. The scan runs
// its own PN generator and long pilot correlator (pilot_energy) on the
// on-time samples:
//   1. wait for lock; start when the locked PN generator wraps, loading the
//      scan generator with the seed at the same chip (phase 0 = the phase
//      of the current cell) and clearing the three best-energy registers;
//   2. correlate one frame (NBLK symbols of 64 chips, energy |I|+|Q|);
//   3. if the energy is among the best three so far, insert it, with the
//      phase, into the sorted registers top_e/top_p (index 0 = largest);
//   4. if the phase is below NPHASE-1, stall the scan generator one chip
//      (phase + 1) and go to 2;
//   5. otherwise copy the three energies and phases to the output
//      registers, pulse rssi_new, and wait for the next start.
// The reported phase is the delay, in chips, of the neighbour's pilot
// behind the current cell's pilot. Losing lock aborts the scan.
//
// Interface: en = chip enable; ion/qon/valid from the data multiplexer;
// lock and pn_allones_l from the main lock machine and PN generator.
// One full scan at the default sizes takes 32768 frames of 1088 chips. The
// algorithm is the document's; the frame length, starting on the PN wrap
// and abort on lock loss are this design's.
module acs #(
  parameter int unsigned NPHASE = demod_pkg::PN_LEN,
  parameter int unsigned NBLK   = demod_pkg::LONG_SYMBOLS,
  parameter int unsigned FRAME  = (NBLK + 1) * demod_pkg::SYMBOL_CHIPS
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  demod_pkg::sm4_t                   ion,
  input  demod_pkg::sm4_t                   qon,
  input  logic                              valid,
  input  logic                              lock,
  input  logic                              pn_allones_l,
  output logic [demod_pkg::THRA_W-1:0]      rssi_e [3],
  output logic [14:0]                       rssi_p [3],
  output logic                              rssi_new,
  output logic                              scanning
);
  import demod_pkg::*;
  typedef enum logic [1:0] {A_IDLE, A_RUN, A_STALL, A_DUMP} acs_st_e;

  acs_st_e           st;
  logic [10:0]       fc;
  logic [14:0]       phase;
  logic [THRA_W-1:0] top_e [3];
  logic [14:0]       top_p [3];
  logic              pn, stall_l, reload, start;
  logic [LONG_W-1:0] im, qm;
  logic              ev;
  logic [THRA_W-1:0] e;
  logic              run_chip;

  assign start    = (st == A_IDLE) && lock && !pn_allones_l;
  assign reload   = start;
  assign stall_l  = (st != A_STALL);
  assign run_chip = (st == A_RUN);
  assign scanning = (st != A_IDLE);

  pn_gen u_pn (
    .clk, .rst_n, .en, .stall_l, .reload, .pn_out(pn), .pn_out1d(), .pn_out2d(),
    .pn_out3d(), .pn_allones_l(), .pn_state());

  pilot_energy #(.NBLK(NBLK)) u_en (
    .clk, .rst_n, .en, .idata(ion), .qdata(qon), .pn, .valid(valid && run_chip),
    .blk_first(run_chip && fc[5:0] == 6'd0), .frame_first(run_chip && fc == 11'd0),
    .i_mag(im), .q_mag(qm), .out_valid(ev));

  assign e = THRA_W'(im) + THRA_W'(qm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= A_IDLE;
      fc       <= '0;
      phase    <= '0;
      rssi_new <= 1'b0;
      for (int k = 0; k < 3; k++) begin
        top_e[k]  <= '0;
        top_p[k]  <= '0;
        rssi_e[k] <= '0;
        rssi_p[k] <= '0;
      end
    end else if (en) begin
      rssi_new <= 1'b0;
      // insert a new frame energy into the sorted best-three list
      if (ev && st == A_RUN) begin
        if (e > top_e[0]) begin
          top_e[2] <= top_e[1]; top_p[2] <= top_p[1];
          top_e[1] <= top_e[0]; top_p[1] <= top_p[0];
          top_e[0] <= e;        top_p[0] <= phase;
        end else if (e > top_e[1]) begin
          top_e[2] <= top_e[1]; top_p[2] <= top_p[1];
          top_e[1] <= e;        top_p[1] <= phase;
        end else if (e > top_e[2]) begin
          top_e[2] <= e;        top_p[2] <= phase;
        end
      end
      unique case (st)
        A_IDLE: if (start) begin
          st    <= A_RUN;
          fc    <= '0;
          phase <= '0;
          for (int k = 0; k < 3; k++) begin
            top_e[k] <= '0;
            top_p[k] <= '0;
          end
        end
        A_RUN: begin
          if (!lock) st <= A_IDLE;
          else if (fc == 11'(FRAME - 1)) begin
            fc <= '0;
            st <= (phase == 15'(NPHASE - 1)) ? A_DUMP : A_STALL;
          end else fc <= fc + 11'd1;
        end
        A_STALL: begin
          phase <= phase + 15'd1;
          st    <= lock ? A_RUN : A_IDLE;
        end
        A_DUMP: begin
          for (int k = 0; k < 3; k++) begin
            rssi_e[k] <= top_e[k];
            rssi_p[k] <= top_p[k];
          end
          rssi_new <= 1'b1;
          st       <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule

// regblk: the four programmable registers (WALSH, THRESA, THRESB, THRESC).
//
// Each register has two levels. The front level is written from the
// DATAIN bus while CS_L and WR_L are both low, to the register chosen by
// ADDR (00 Walsh number, 6 bits; 01 threshold A, 14 bits; 10 threshold B,
// 15 bits; 11 threshold C, 15 bits); the low bits of DATAIN are used. The
// back level, which the rest of the chip reads, copies the front level on
// every clock during reset and, in operation, only on the chip in which the
// PN generator holds its all-ones state, so a new Walsh number or threshold
// takes effect exactly at a PN period boundary and never mid-correlation.
//
// Interface: clk is the chip-domain clock, en the chip enable. The bus
// write is sampled synchronously on clk here, where the original design
// used a strobe derived from CS_L/WR_L as the front latch clock. The front
// registers have no reset: as in the document, software must load them.
// rst_n is used synchronously here on purpose: the back registers copy the
// front ones on every clock while reset is held.
module regblk (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  logic                              pn_allones_l,
  input  logic                              csl,
  input  logic                              wrl,
  input  demod_pkg::reg_addr_e              addr,
  input  logic [14:0]                       datain,
  output logic [5:0]                        walshnum,
  output logic [demod_pkg::THRA_W-1:0]      thresa,
  output logic [demod_pkg::THRB_W-1:0]      thresb,
  output logic [demod_pkg::THRC_W-1:0]      thresc
);
  import demod_pkg::*;
  logic [5:0]        f_walsh;
  logic [THRA_W-1:0] f_thra;
  logic [THRB_W-1:0] f_thrb;
  logic [THRC_W-1:0] f_thrc;

  always_ff @(posedge clk) begin
    if (!csl && !wrl) begin
      unique case (addr)
        REG_WALSH: f_walsh <= datain[5:0];
        REG_THRA:  f_thra  <= datain[THRA_W-1:0];
        REG_THRB:  f_thrb  <= datain[THRB_W-1:0];
        REG_THRC:  f_thrc  <= datain[THRC_W-1:0];
        default:   ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || (en && !pn_allones_l)) begin
      walshnum <= f_walsh;
      thresa   <= f_thra;
      thresb   <= f_thrb;
      thresc   <= f_thrc;
    end
  end
endmodule

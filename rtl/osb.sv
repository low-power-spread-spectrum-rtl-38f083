// osb: observation block, the 28-bit 8:1 output multiplexer.
//
// OMODE (3 bits) chooses which of eight 28-bit groups of internal signals
// is driven onto the ODATA bus; the choice is registered on the chip clock
// so the bus changes only once per chip. The grouping of signals into the
// eight words is made by the instantiating module (see demod_top); the
// document's table of the eight groups is not reproduced, so that grouping
// is this design's.
//
// Interface: clk/en = chip clock enable, words[k] shown when omode == k;
// odata updates on the enabled clock after omode or the word changes.
module osb (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [2:0]  omode,
  input  logic [27:0] words [8],
  output logic [27:0] odata
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  odata <= '0;
    else if (en) odata <= words[omode];
  end
endmodule

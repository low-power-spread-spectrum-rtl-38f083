// testmode: input format conversion ahead of the data multiplexer.
//
// TSTMODE selects what drives the two sign-magnitude sample streams:
//   00 normal: IIN/QIN are the ADC's sign-magnitude streams, unchanged.
//   01 test:   IIN/QIN are offset binary 0..15 and are converted to
//              sign-magnitude by subtracting 8 (value-8, with -8 clipped
//              to -7).
//   10 test:   IIN, IINX, QIN, QINX are four two's-complement streams
//              (-8..7, -8 clipped to -7) at the chip rate, from a
//              transmitter chip; they are interleaved into two streams at
//              twice the chip rate: the I stream carries IIN in the
//              on-time slot and IINX in the off-time slot (odd_i = 1),
//              the Q stream QIN and QINX likewise (odd_q = 1).
//   11 undefined: treated as normal.
// Purely combinational. The modes come from the document; the exact
// conversions (offset of 8, clipping of -8) and which half of the chip
// carries IINX are this design's choices.
module testmode (
  input  demod_pkg::tstmode_e tstmode,
  input  logic                odd_i,
  input  logic                odd_q,
  input  logic [3:0]          iin,
  input  logic [3:0]          qin,
  input  logic [3:0]          iinx,
  input  logic [3:0]          qinx,
  output demod_pkg::sm4_t     iout,
  output demod_pkg::sm4_t     qout
);
  import demod_pkg::*;

  function automatic sm4_t bin2sm(logic [3:0] b);
    return int_to_sm(5'($signed({1'b0, b})) - 5'sd8);
  endfunction

  function automatic sm4_t two2sm(logic [3:0] t);
    return int_to_sm(5'($signed(t)));
  endfunction

  always_comb begin
    unique case (tstmode)
      TM_BIN: begin
        iout = bin2sm(iin);
        qout = bin2sm(qin);
      end
      TM_TWOS: begin
        iout = two2sm(odd_i ? iinx : iin);
        qout = two2sm(odd_q ? qinx : qin);
      end
      default: begin
        iout = sm4_t'(iin);
        qout = sm4_t'(qin);
      end
    endcase
  end
endmodule

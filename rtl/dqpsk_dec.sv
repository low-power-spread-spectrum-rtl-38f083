// dqpsk_dec: DQPSK slicer for the despread symbol stream.
//
// For the current symbol S_n = I_n + jQ_n and the previous one S_(n-1) it
// forms the numerator of S_n / S_(n-1):
//   Re = I_n*I_(n-1) + Q_n*Q_(n-1),   Im = I_(n-1)*Q_n - I_n*Q_(n-1)
// and decides which quarter of the circle the phase change lies in from
// the signs and the larger magnitude of Re and Im, so no division or angle
// is needed:
//   -45..45 deg -> 00,  45..135 -> 01,  135..225 -> 11,  225..315 -> 10
// (bit pair written as (bit_(n+1), bit_n)), the inverse of the encoder's
// mapping 00->0, 01->90, 11->180, 10->270 degrees. On a boundary the
// half-open ranges (-45, 45], (45, 135], ... decide.
//
// Interface: in_valid (qualified by en) presents a new symbol; two clocks
// later (one enabled clock) bits/out_valid give the decision for the phase
// change from the previous symbol. The first symbol after reset only loads
// the history and gives no output. Widths follow the 10-bit correlator.
module dqpsk_dec #(
  parameter int unsigned W = demod_pkg::SHORT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic [1:0]          bits,       // {bit_(n+1), bit_n}
  output logic                out_valid
);
  localparam int unsigned PW = 2 * W + 1;
  logic signed [W-1:0]  ip, qp;
  logic                 have_prev;
  logic signed [PW-1:0] re, im;
  logic [PW-1:0]        are, aim;
  logic [1:0]           dec;

  assign re  = PW'(i_in * ip) + PW'(q_in * qp);
  assign im  = PW'(ip * q_in) - PW'(i_in * qp);
  assign are = re[PW-1] ? PW'(-re) : PW'(re);
  assign aim = im[PW-1] ? PW'(-im) : PW'(im);

  always_comb begin
    if (are > aim)      dec = re[PW-1] ? 2'b11 : 2'b00;
    else if (aim > are) dec = im[PW-1] ? 2'b10 : 2'b01;
    else begin
      // |Re| == |Im|: exactly on a 45-degree line
      unique case ({re[PW-1], im[PW-1]})
        2'b00:   dec = 2'b00;  //  +45  -> (-45, 45]
        2'b10:   dec = 2'b01;  // +135  -> (45, 135]
        2'b11:   dec = 2'b11;  // +225  -> (135, 225]
        default: dec = 2'b10;  //  -45  -> (225, 315]
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip        <= '0;
      qp        <= '0;
      have_prev <= 1'b0;
      bits      <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        ip        <= i_in;
        qp        <= q_in;
        have_prev <= 1'b1;
        if (have_prev) begin
          bits      <= dec;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule

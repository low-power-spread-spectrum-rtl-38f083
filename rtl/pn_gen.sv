// pn_gen: pilot PN sequence generator, 32768 chips per period.
//
// A 16-bit Fibonacci shift register shifts right once per chip; the new
// bit 15 is the XOR of bits 15, 13, 4 and 0, and the chip output is bit 0.
// The full 16-bit sequence is 65535 long, so it is cut to 32768 chips: the
// register is reloaded with SEED on the chip after it reaches all ones.
// As in the original design, the all-ones state is found one chip early by
// detecting 16'hFFFE (whose successor is all ones) and registering the
// result; pn_allones_l is low for exactly the chip in which the register
// holds all ones and tells the Walsh generator and register block that the
// sequence restarts on the next chip.
//
// Interface: en is the chip-rate enable (one clock per chip); stall_l = 0
// freezes the register and the three delay taps for that chip, which is how
// lock acquisition slides the local code against the received one.
// pn_out1d..pn_out3d are pn_out delayed by 1..3 chips for correlators 1..3.
// Reset loads the seed (document); reset is asynchronous and active low
// (this design's choice). reload = 1 on an enabled clock restarts the
// sequence at the seed, used by the adjacent cell scan to start its own
// generator in step with the locked one. Outputs are registered or decoded from registers.
module pn_gen #(
  parameter logic [15:0] SEED = demod_pkg::PN_SEED
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        stall_l,
  input  logic        reload,
  output logic        pn_out,
  output logic        pn_out1d,
  output logic        pn_out2d,
  output logic        pn_out3d,
  output logic        pn_allones_l,
  output logic [15:0] pn_state
);
  logic [15:0] sr;
  logic        allones_q;
  logic [2:0]  dly;
  logic        fb;
  logic        adv;

  assign adv = en && stall_l;
  assign fb  = sr[15] ^ sr[13] ^ sr[4] ^ sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= SEED;
      allones_q <= 1'b0;
      dly       <= '0;
    end else if (en && reload) begin
      sr        <= SEED;
      allones_q <= 1'b0;
      dly       <= '0;
    end else if (adv) begin
      sr        <= allones_q ? SEED : {fb, sr[15:1]};
      // next state is all ones exactly when the current one is FFFE
      allones_q <= !allones_q && (sr == 16'hFFFE);
      dly       <= {dly[1:0], sr[0]};
    end
  end

  assign pn_out       = sr[0];
  assign pn_out1d     = dly[0];
  assign pn_out2d     = dly[1];
  assign pn_out3d     = dly[2];
  assign pn_allones_l = !allones_q;
  assign pn_state     = sr;
endmodule

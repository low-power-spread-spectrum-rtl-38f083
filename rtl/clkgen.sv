// clkgen: 64 MHz chip clock generator with quarter-chip phase steps.
//
// In the chip, two toggle flip-flops on the two phases of the 128 MHz
// oscillator and their inverters give four 64 MHz clocks CLKA..CLKD, a
// quarter chip (about 4 ns) apart, and one of them is passed on through a
// pass gate chosen by a one-hot-low state (sel_clk_l = 0111 selects CLKA,
// 1011 CLKB, 1101 CLKC, 1110 CLKD). Here the same behaviour is written as
// synchronous logic on a quarter-chip clock `clk` (one period per half
// 128 MHz cycle): qc counts the quarters, and the selected clock has its
// rising edge, the strobe clkx, when qc equals the selected phase.
//
// Phase control, once per frame: at a clkx edge,
//   pre_ext_l = !(!change_phase_l & lock & valid_data &  extend_phase)
//   pre_shr_l = !(!change_phase_l & lock & valid_data & !extend_phase)
// are latched into ext_l/shr_l. With ext_l = 0 the selection moves one
// phase later (A->B->C->D->A) one quarter after the next clkx edge, once
// the later clock's edge for that chip has passed, so that chip lasts five
// quarters (switching at the edge itself would give a one-quarter glitch).
// With shr_l = 0 the selection moves one phase earlier (A->D->C->B->A) at
// the next clkx edge, so that chip lasts three quarters. A three-quarter chip is too short for the
// correlators, so killpulse_l goes low for it and the correlator clock
// edge that ends it is removed (one sample lost); the control clock keeps
// that edge so the PN generator stays in step with the transmitter.
//
// Interface: clk/clkrst (quarter counter reset, CLKRST), rst_n (RESET_L:
// selects CLKA and clears the control flops). valid_data, lock,
// extend_phase and change_phase_l are chip-domain levels sampled at clkx.
// Outputs: clkx (one clk pulse per chip), killpulse_l (low during the
// clkx pulse to be removed), sel_clk_l, ext_l, shr_l, qc. The state
// encoding, transitions and equations follow the document's state diagram;
// writing the pass-gate clock mux as a strobe on a quarter-chip clock is
// this design's.
module clkgen (
  input  logic       clk,
  input  logic       clkrst,
  input  logic       rst_n,
  input  logic       valid_data,
  input  logic       extend_phase,
  input  logic       change_phase_l,
  input  logic       lock,
  output logic       clkx,
  output logic       killpulse_l,
  output logic [3:0] sel_clk_l,
  output logic       ext_l,
  output logic       shr_l,
  output logic [1:0] qc
);
  logic [1:0] idx;
  logic       pre_ext_l, pre_shr_l, kill, ext_go;

  always_ff @(posedge clk or posedge clkrst) begin
    if (clkrst) qc <= 2'd0;
    else        qc <= qc + 2'd1;
  end

  always_comb begin
    unique case (sel_clk_l)
      4'b1011: idx = 2'd1;
      4'b1101: idx = 2'd2;
      4'b1110: idx = 2'd3;
      default: idx = 2'd0;
    endcase
  end

  assign clkx      = (qc == idx);
  assign pre_ext_l = !(!change_phase_l && lock && valid_data &&  extend_phase);
  assign pre_shr_l = !(!change_phase_l && lock && valid_data && !extend_phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_clk_l <= 4'b0111;
      ext_l     <= 1'b1;
      shr_l     <= 1'b1;
      kill      <= 1'b0;
      ext_go    <= 1'b0;
    end else if (ext_go) begin
      ext_go    <= 1'b0;
      sel_clk_l <= {sel_clk_l[0], sel_clk_l[3:1]};                   // next phase
    end else if (clkx) begin
      ext_l  <= pre_ext_l;
      shr_l  <= pre_shr_l;
      kill   <= 1'b0;
      ext_go <= !ext_l;
      if (!shr_l) begin
        sel_clk_l <= {sel_clk_l[2:0], sel_clk_l[3]};                 // previous phase
        kill      <= 1'b1;
      end
    end
  end

  assign killpulse_l = !(kill && clkx);

  // exactly one pass gate may conduct
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(~sel_clk_l)) else $error("sel_clk_l not one-hot-low");
endmodule

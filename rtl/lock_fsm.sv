// lock_fsm: lock status state machine.
//
// Three states, encoded as in the original design:
//   00 no lock       -> 01 when valid_data and any correlator flag c_l is 0
//                       (its energy reached threshold A)
//   01 locked (LOCK) -> 10 when valid_data and t_reset (early+late energy
//                       fell below threshold B)
//   10 lock reset    -> 00 on the next chip (LOCKRESET pulse)
// lockstbits exposes the state for debugging.
//
// Interface: en = chip enable; valid_data comes from the update controller
// once per 1088-chip frame; c_l[k] is correlator k's active-low threshold
// flag; t_reset comes from the early/late correlators. Outputs are decoded
// from the state register. Asynchronous active-low reset to 00.
module lock_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       valid_data,
  input  logic [3:0] c_l,
  input  logic       t_reset,
  output logic       lock,
  output logic       lockrst,
  output logic [1:0] lockstbits
);
  typedef enum logic [1:0] {
    L_NOLOCK = 2'b00,
    L_LOCK   = 2'b01,
    L_RESET  = 2'b10
  } lock_st_e;

  lock_st_e st, st_nxt;
  logic     var_x, var_y;

  assign var_x = valid_data && !(&c_l);
  assign var_y = valid_data && t_reset;

  always_comb begin
    st_nxt = st;
    unique case (st)
      L_NOLOCK: if (var_x) st_nxt = L_LOCK;
      L_LOCK:   if (var_y) st_nxt = L_RESET;
      L_RESET:  st_nxt = L_NOLOCK;
      default:  st_nxt = L_NOLOCK;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  st <= L_NOLOCK;
    else if (en) st <= st_nxt;
  end

  assign lock       = (st == L_LOCK);
  assign lockrst    = (st == L_RESET);
  assign lockstbits = st;
endmodule

// cu_temp: state controller CU0 of the temporary cell C0.
//
// C0 is where a pushed word lands. A push is accepted (push_ready) when C0
// is empty and the stack is not full, i.e. at least one of C1..CN is empty;
// the column then loads the host codeword. A word waiting in C0 moves on to
// the top cell C1 as soon as C1 is empty, and C0 is cleared. Otherwise the
// column is refreshed. C0 never loads from the right, so its ld_r control is
// constant 0. The occupied state lives in a JK flip-flop: J is an
// accepted push, K the hand-over to C1. push_ready depends only on state and
// on full, not on push, so the host may decide on it within the cycle.
module cu_temp
  import scs_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  logic      full,
  input  logic      occ_r,
  output logic      occ,
  output logic      push_ready,
  output cell_ctl_t ctl
);
  logic take, give;

  assign push_ready = ~occ & ~full;
  assign take       = push & push_ready;
  assign give       = occ & ~occ_r;

  jk_ff u_state (.clk, .rst_n, .j(take), .k(give), .q(occ));

  always_comb begin
    ctl      = '0;
    ctl.ld_l = take;
    ctl.clr  = give;
    ctl.rfsh = ~(take | give);
  end
endmodule

// cu_top: state controller CU1 of the top cell C1.
//
// C1 drives the data bus. On a pop (accepted when C1 is occupied and C0 is
// empty, so a newer word still waiting in C0 is never passed over) the word
// leaves on the bus and the column is cleared. When C0 and C1 are both
// occupied and C2 is empty, the top word shifts on to C2 (Rule 1). When C1 is
// empty it takes the waiting word of C0, or, if C0 is empty too, the word of
// C2 (Rule 2 seen from C2). Otherwise it refreshes. The occupied state lives
// in a JK flip-flop. pop_ready depends only on state.
module cu_top
  import scs_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      pop,
  input  logic      occ_l,   // C0 occupied
  input  logic      occ_r,   // C2 occupied
  output logic      occ,
  output logic      pop_ready,
  output cell_ctl_t ctl
);
  logic do_pop, mv_r, in_l, in_r;

  assign pop_ready = occ & ~occ_l;
  assign do_pop    = pop & pop_ready;
  assign mv_r      = occ_l & occ & ~occ_r;
  assign in_l      = occ_l & ~occ;
  assign in_r      = ~occ_l & ~occ & occ_r;

  jk_ff u_state (.clk, .rst_n, .j(in_l | in_r), .k(do_pop | mv_r), .q(occ));

  always_comb begin
    ctl      = '0;
    ctl.ld_l = in_l;
    ctl.ld_r = in_r;
    ctl.clr  = do_pop | mv_r;
    ctl.rfsh = ~(in_l | in_r | do_pop | mv_r);
  end
endmodule

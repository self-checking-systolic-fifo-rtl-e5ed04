// cu_std: state controller CUi of a standard cell Ci, i = 2..N.
//
// Applies the two rules of the systolic stack to its own cell, looking at the
// two cells on its left (nearer the host) and the one on its right:
//   Rule 1: C(i-1) and Ci occupied, C(i+1) empty  -> the word moves right.
//   Rule 2: C(i-2) and C(i-1) empty, Ci occupied  -> the word moves left.
// The same rules, applied by the neighbours, tell it when to take a word:
// from the left when C(i-2), C(i-1) are occupied and Ci is empty, from the
// right when C(i-1), Ci are empty and C(i+1) is occupied. The conditions
// exclude each other, so all cells act on the same clock edge. LAST marks CN,
// which has no right neighbour: it neither moves right nor loads from the
// right. The occupied state lives in a JK flip-flop (J: a word arrives,
// K: the word leaves).
module cu_std
  import scs_pkg::*;
#(
  parameter bit LAST = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      occ_l2,  // C(i-2) occupied
  input  logic      occ_l1,  // C(i-1) occupied
  input  logic      occ_r,   // C(i+1) occupied, ignored when LAST
  output logic      occ,
  output cell_ctl_t ctl
);
  logic mv_r, mv_l, in_l, in_r;

  assign mv_r = !LAST && (occ_l1 & occ & ~occ_r);
  assign mv_l = ~occ_l2 & ~occ_l1 & occ;
  assign in_l = occ_l2 & occ_l1 & ~occ;
  assign in_r = !LAST && (~occ_l1 & ~occ & occ_r);

  jk_ff u_state (.clk, .rst_n, .j(in_l | in_r), .k(mv_r | mv_l), .q(occ));

  always_comb begin
    ctl      = '0;
    ctl.ld_l = in_l;
    ctl.ld_r = in_r;
    ctl.clr  = mv_r | mv_l;
    ctl.rfsh = ~(in_l | in_r | mv_r | mv_l);
  end
endmodule

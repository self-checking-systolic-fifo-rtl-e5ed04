// storage_cell: basic one-bit cell of the stack's storage array.
//
// Every bit of every stored word is one of these cells. It has two data
// inputs, the bits of its left and right neighbours in the same row, and two
// outputs, its stored bit going to both neighbours (one port, q). The four
// one-hot controls of its column choose the next value on the clock edge:
// ld_l takes the left bit, ld_r the right bit, rfsh keeps the bit and clr
// loads CLEAR_BIT. Reset loads CLEAR_BIT.
module storage_cell
  import scs_pkg::*;
#(
  parameter logic CLEAR_BIT = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cell_ctl_t ctl,
  input  logic      from_l,
  input  logic      from_r,
  output logic      q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= CLEAR_BIT;
    else if (ctl.ld_l) q <= from_l;
    else if (ctl.ld_r) q <= from_r;
    else if (ctl.clr)  q <= CLEAR_BIT;
  end
endmodule

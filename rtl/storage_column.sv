// storage_column: one word-wide column of the stack's storage array.
//
// Holds a W-bit codeword (data word and its check symbol) in W basic cells
// (storage_cell), one per row of the array. Each cell has two inputs, the
// bits of the left and right neighbours, and two outputs, the stored bit
// going to both neighbours. Four one-hot controls (scs_pkg::cell_ctl_t),
// shared by the column, pick the next value on the clock edge: ld_l takes
// the left word, ld_r the right word, rfsh keeps the word and clr loads
// CLEAR_WORD. The stack sets CLEAR_WORD to a valid codeword (all-zero data
// with its zero count) so that an empty top cell never trips the checker.
// Reset loads CLEAR_WORD. An assertion checks that the controls are one-hot.
module storage_column
  import scs_pkg::*;
#(
  parameter int unsigned    W          = DATA_W + berger_k(DATA_W),
  parameter logic [W-1:0]   CLEAR_WORD = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cell_ctl_t    ctl,
  input  logic [W-1:0] from_l,
  input  logic [W-1:0] from_r,
  output logic [W-1:0] q
);
  for (genvar b = 0; b < W; b++) begin : g_bit
    storage_cell #(.CLEAR_BIT(CLEAR_WORD[b])) u_cell (
      .clk, .rst_n, .ctl, .from_l(from_l[b]), .from_r(from_r[b]), .q(q[b])
    );
  end

  a_ctl_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ctl))
    else $error("storage_column: controls not one-hot: %b", ctl);
endmodule

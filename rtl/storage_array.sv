// storage_array: the word columns C0..CN of the systolic stack.
//
// C0 is the temporary cell: its left input is the push codeword from the
// host side. C1 is the top of the stack and drives the pop data bus. C2..CN
// hold the rest; CN has no right neighbour, so its right input is tied to
// the clear word. Each column takes its four controls from its own state
// controller; words move at most one column per clock, left or right,
// carrying their check symbols with them. Each column is W = I + K bits
// wide: the data word plus its Berger check symbol.
module storage_array
  import scs_pkg::*;
#(
  parameter int unsigned  W          = DATA_W + berger_k(DATA_W),
  parameter int unsigned  N          = 16,
  parameter logic [W-1:0] CLEAR_WORD = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cell_ctl_t [N:0]      ctl,
  input  logic [W-1:0]         push_word,
  output logic [W-1:0]         top_word,
  output logic [N:0][W-1:0]    words
);
  for (genvar c = 0; c <= N; c++) begin : g_col
    logic [W-1:0] left_in, right_in;
    if (c == 0) begin : g_first
      assign left_in = push_word;
    end else begin : g_mid
      assign left_in = words[c-1];
    end
    if (c == N) begin : g_end
      assign right_in = CLEAR_WORD;
    end else begin : g_inner
      assign right_in = words[c+1];
    end
    storage_column #(.W(W), .CLEAR_WORD(CLEAR_WORD)) u_col (
      .clk, .rst_n, .ctl(ctl[c]), .from_l(left_in), .from_r(right_in), .q(words[c])
    );
  end

  assign top_word = words[1];
endmodule

// scs_stack: self-checking systolic LIFO register stack.
//
// Words pushed by the host get their Berger check symbol (zero count) from a
// check symbol generator and enter the temporary cell C0 as one codeword.
// Cells C1 (top) .. CN each hold one codeword and have their own small state
// controller that sees only its neighbours' occupied bits; the words settle
// by Rule 1 (move away from the host into an empty cell behind two occupied
// ones) and Rule 2 (move toward the host over two empty cells), so no signal
// spans the array except push, pop and the full flag. A popped word is read
// from C1 over the data bus and checked at once: a second generator
// regenerates its symbol and a two-rail checker compares it with the stored
// one, raising the two-rail error pair on any unidirectional error.
//
// Handshake: push_ready and pop_ready depend only on state. A push is taken
// on a clock edge where push and push_ready are high; a pop where pop and
// pop_ready are high, and pop_data, pop_check and err are valid in that cycle
// (C1's register, read combinationally). A push and a pop may be taken in the
// same cycle; the pop then returns the word pushed before. The stack holds N
// words; C0 is only a landing place. Capacity N = 16 and the handshake are
// this design's choices; the 32-bit word with a 6-bit symbol follows the
// design's example.
module scs_stack
  import scs_pkg::*;
#(
  parameter int unsigned I = DATA_W,
  parameter int unsigned N = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [I-1:0]             push_data,
  output logic                     push_ready,
  input  logic                     pop,
  output logic                     pop_ready,
  output logic [I-1:0]             pop_data,
  output logic [berger_k(I)-1:0]   pop_check,
  output logic [1:0]               err,
  output logic                     full,
  output logic                     empty
);
  localparam int unsigned K = berger_k(I);
  localparam int unsigned W = I + K;
  // All-zero data with its zero count: a valid codeword for empty cells.
  localparam logic [W-1:0] CLEAR_WORD = {K'(I), I'(0)};

  if (N < 2) begin : g_bad_n
    $error("scs_stack needs N >= 2");
  end

  logic [K-1:0]         push_check;
  logic [W-1:0]         top_word;
  logic [N:0][W-1:0]    words;
  logic [N:0]           occ;
  cell_ctl_t [N:0]      ctl;

  berger_csg #(.I(I), .K(K)) u_csg_in (.data(push_data), .check(push_check));

  storage_array #(.W(W), .N(N), .CLEAR_WORD(CLEAR_WORD)) u_array (
    .clk, .rst_n, .ctl, .push_word({push_check, push_data}), .top_word, .words
  );

  assign full  = &occ[N:1];
  assign empty = ~|occ;

  cu_temp u_cu0 (
    .clk, .rst_n, .push, .full, .occ_r(occ[1]), .occ(occ[0]), .push_ready, .ctl(ctl[0])
  );

  cu_top u_cu1 (
    .clk, .rst_n, .pop, .occ_l(occ[0]), .occ_r(occ[2]), .occ(occ[1]), .pop_ready,
    .ctl(ctl[1])
  );

  for (genvar i = 2; i <= N; i++) begin : g_cu
    logic right_occ;
    if (i == N) begin : g_last
      assign right_occ = 1'b0;
    end else begin : g_inner
      assign right_occ = occ[i+1];
    end
    cu_std #(.LAST(i == N)) u_cu (
      .clk, .rst_n, .occ_l2(occ[i-2]), .occ_l1(occ[i-1]), .occ_r(right_occ),
      .occ(occ[i]), .ctl(ctl[i])
    );
  end

  assign pop_data  = top_word[I-1:0];
  assign pop_check = top_word[W-1:I];

  berger_checker #(.I(I), .K(K)) u_checker (.data(pop_data), .check(pop_check), .err);

  // A word may only leave C1 by a pop if nothing newer waits in C0.
  a_pop_order: assert property (@(posedge clk) disable iff (!rst_n)
                                (pop && pop_ready) |-> !occ[0]);
endmodule

// berger_csg: Berger check symbol generator (zero counter).
//
// Counts the zeros among the I information bits and gives the count in binary
// as the K-bit check symbol. A unidirectional error (only 1->0 or only 0->1
// flips) in the word, the symbol or both always makes the regenerated symbol
// differ from the stored one, which is what the stack's checker relies on.
// Purely combinational. The zero count is written as a sum of inverted bits;
// the adder tree that implements it is left to synthesis.
// Defaults: I = 32, K = 6, the 32-bit example of the design.
module berger_csg #(
  parameter int unsigned I = scs_pkg::DATA_W,
  parameter int unsigned K = scs_pkg::berger_k(I)
) (
  input  logic [I-1:0] data,
  output logic [K-1:0] check
);
  always_comb begin
    check = '0;
    for (int b = 0; b < I; b++) if (!data[b]) check = check + K'(1);
  end
endmodule

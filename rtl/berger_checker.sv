// berger_checker: concurrent error check of a Berger codeword.
//
// The check symbol of the data bits is regenerated by a zero counter and
// compared with the stored check symbol through a two-rail checker. The
// stored bits drive the true rails and the inverted regenerated bits the
// complement rails, so a clean codeword presents complementary pairs.
// err = 2'b10 or 2'b01: no error; 2'b00 or 2'b11: the word or its symbol is
// corrupted. Every unidirectional error is detected. Combinational.
module berger_checker #(
  parameter int unsigned I = scs_pkg::DATA_W,
  parameter int unsigned K = scs_pkg::berger_k(I)
) (
  input  logic [I-1:0] data,
  input  logic [K-1:0] check,
  output logic [1:0]   err
);
  logic [K-1:0] regen;

  berger_csg #(.I(I), .K(K)) u_csg (.data(data), .check(regen));

  two_rail_checker #(.N(K)) u_trc (.x(check), .y(~regen), .z(err));
endmodule

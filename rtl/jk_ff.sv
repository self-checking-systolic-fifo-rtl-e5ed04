// jk_ff: edge-triggered JK flip-flop with asynchronous active-low reset.
//
// Holds the occupied/empty state of one stack cell. J sets, K clears, J and K
// together toggle, neither holds. The state controllers of the stack are
// built around it; a master-slave JK pair behaves the same as this single
// edge-triggered flip-flop once both stages are clocked from one edge.
// Reset leaves the cell empty (q = 0).
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else begin
      unique case ({j, k})
        2'b10:   q <= 1'b1;
        2'b01:   q <= 1'b0;
        2'b11:   q <= ~q;
        default: q <= q;
      endcase
    end
  end
endmodule

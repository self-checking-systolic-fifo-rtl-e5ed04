// two_rail_checker: totally self-checking two-rail checker tree.
//
// Input pair b is (x[b], y[b]); in fault-free operation y[b] = ~x[b]. The
// output pair z = {z1, z0} is complementary (2'b10 or 2'b01) exactly when
// every input pair is complementary; 2'b00 or 2'b11 reports an error. Two
// pairs are merged by the classic cell z1 = x1 x2 + y1 y2, z0 = x1 y2 + y1 x2,
// and N pairs by a balanced binary tree of such cells: level l+1 merges pairs
// 2j and 2j+1 of level l, and a pair left over at an odd-sized level is
// passed on unchanged. A single pair is passed through.
// Combinational; the depth is ceil(log2 N) cells.
module two_rail_checker #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [1:0]   z
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Number of pairs at tree level l.
  function automatic int unsigned pairs_at(int unsigned l);
    int unsigned n = N;
    for (int unsigned k = 0; k < l; k++) n = (n + 1) / 2;
    return n;
  endfunction

  // t1/t0: true and complement rails of every level; level 0 is the input.
  logic [LEVELS:0][N-1:0] t1, t0;

  assign t1[0] = x;
  assign t0[0] = y;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = pairs_at(l);
    localparam int unsigned NOUT = pairs_at(l + 1);
    for (genvar j = 0; j < N; j++) begin : g_pair
      if (j < NOUT && 2 * j + 1 < NIN) begin : g_cell
        assign t1[l+1][j] = (t1[l][2*j] & t1[l][2*j+1]) | (t0[l][2*j] & t0[l][2*j+1]);
        assign t0[l+1][j] = (t1[l][2*j] & t0[l][2*j+1]) | (t0[l][2*j] & t1[l][2*j+1]);
      end else if (j < NOUT) begin : g_pass
        assign t1[l+1][j] = t1[l][2*j];
        assign t0[l+1][j] = t0[l][2*j];
      end else begin : g_unused
        assign t1[l+1][j] = 1'b0;
        assign t0[l+1][j] = 1'b0;
      end
    end
  end

  assign z = {t1[LEVELS][0], t0[LEVELS][0]};
endmodule

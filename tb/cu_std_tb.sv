// cu_std_tb: checks the standard-cell controller against the two rules.
//
// The neighbour occupancies C(i-2), C(i-1), C(i+1) are driven at random each
// cycle; the testbench keeps its own copy of the cell's occupancy. The two
// rules are written once as functions over three consecutive cells and then
// applied from every position the cell can take in them: as the mover and as
// the receiver. One inner instance and one LAST instance (no right
// neighbour) are checked.
module cu_std_tb;
  import scs_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic l2, l1, r;
  logic occ_a, occ_b;
  cell_ctl_t ctl_a, ctl_b;
  logic m_a, m_b;

  cu_std                 u_a (.clk, .rst_n, .occ_l2(l2), .occ_l1(l1), .occ_r(r), .occ(occ_a), .ctl(ctl_a));
  cu_std #(.LAST(1'b1))  u_b (.clk, .rst_n, .occ_l2(l2), .occ_l1(l1), .occ_r(r), .occ(occ_b), .ctl(ctl_b));

  always #5 clk = ~clk;

  // Rule 1 on cells (a,b,c): the word in b moves right into c.
  function automatic bit rule1(bit a, bit b, bit c); return a && b && !c; endfunction
  // Rule 2 on cells (a,b,c): the word in c moves left into b.
  function automatic bit rule2(bit a, bit b, bit c); return !a && !b && c; endfunction

  function automatic cell_ctl_t expect_ctl(bit a2, bit a1, bit o, bit rr, bit last);
    cell_ctl_t e;
    bit in_l, in_r, out;
    in_l = rule1(a2, a1, o);
    in_r = !last && rule2(a1, o, rr);
    out  = (!last && rule1(a1, o, rr)) || rule2(a2, a1, o);
    e = '0;
    e.ld_l = in_l;
    e.ld_r = in_r;
    e.clr  = out;
    e.rfsh = !(in_l || in_r || out);
    return e;
  endfunction

  task automatic check_one(string name, logic occ, logic model, cell_ctl_t ctl, cell_ctl_t exp_ctl);
    checks++;
    if (occ != model || ctl != exp_ctl) begin
      failures++;
      $display("FAIL %s l2=%b l1=%b r=%b occ=%b/%b ctl=%b/%b", name, l2, l1, r, occ, model, ctl, exp_ctl);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_ctl_t ea, eb;
    int moves_seen [4];
    {l2, l1, r} = '0;
    m_a = 0;
    m_b = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {l2, l1, r} = 3'($urandom);
      #1;
      ea = expect_ctl(l2, l1, m_a, r, 0);
      eb = expect_ctl(l2, l1, m_b, r, 1);
      check_one("inner", occ_a, m_a, ctl_a, ea);
      check_one("last", occ_b, m_b, ctl_b, eb);
      if (ea.ld_l) moves_seen[0]++;
      if (ea.ld_r) moves_seen[1]++;
      if (ea.clr)  moves_seen[2]++;
      if (eb.ld_l) moves_seen[3]++;
      if (ea.ld_l || ea.ld_r) m_a = 1; else if (ea.clr) m_a = 0;
      if (eb.ld_l || eb.ld_r) m_b = 1; else if (eb.clr) m_b = 0;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (moves_seen[k] == 0) begin
        failures++;
        $display("FAIL move kind %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

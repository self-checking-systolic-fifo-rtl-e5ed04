// cu_top_tb: checks the top-cell controller.
//
// C0 and C2 occupancies and the pop request are random; the testbench tracks
// C1's occupancy. Expected behaviour: pop accepted only with C1 full and C0
// empty (word leaves, column cleared); C1 shifts right when C0, C1 full and
// C2 empty; an empty C1 takes C0's word, or C2's when C0 is empty too.
module cu_top_tb;
  import scs_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pop, l, r, occ, pop_ready;
  cell_ctl_t ctl, e;
  logic m;
  int pops = 0;

  cu_top dut (.clk, .rst_n, .pop, .occ_l(l), .occ_r(r), .occ, .pop_ready, .ctl);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ready;
    {pop, l, r} = '0;
    m = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {pop, l, r} = 3'($urandom);
      #1;
      e = '0;
      exp_ready = 0;
      if (m) begin
        if (!l) begin
          exp_ready = 1;
          if (pop) begin e.clr = 1; pops++; end
          else e.rfsh = 1;
        end else if (!r) e.clr = 1;      // shift on to C2
        else e.rfsh = 1;
      end else begin
        if (l) e.ld_l = 1;               // temporary word moves in
        else if (r) e.ld_r = 1;          // C2 word moves up
        else e.rfsh = 1;
      end
      checks++;
      if (occ != m || ctl != e || pop_ready != exp_ready) begin
        failures++;
        $display("FAIL pop=%b l=%b r=%b occ=%b/%b ctl=%b/%b ready=%b/%b",
                 pop, l, r, occ, m, ctl, e, pop_ready, exp_ready);
      end
      if (e.ld_l || e.ld_r) m = 1; else if (e.clr) m = 0;
    end
    checks++;
    if (pops == 0) begin
      failures++;
      $display("FAIL no pop exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

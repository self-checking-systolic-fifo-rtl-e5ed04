// cu_temp_tb: checks the temporary-cell controller.
//
// push, full and C1's occupancy are random; the testbench tracks C0's
// occupancy. Expected: a push is accepted (column loads the host word) only
// when C0 is empty and the stack is not full; a waiting word goes to C1 (column
// cleared) as soon as C1 is empty; otherwise the column is refreshed.
module cu_temp_tb;
  import scs_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, full, r, occ, push_ready;
  cell_ctl_t ctl, e;
  logic m;
  int pushes = 0, handovers = 0;

  cu_temp dut (.clk, .rst_n, .push, .full, .occ_r(r), .occ, .push_ready, .ctl);

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
    {push, full, r} = '0;
    m = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {push, full, r} = 3'($urandom);
      #1;
      e = '0;
      exp_ready = !m && !full;
      if (!m && !full && push) begin e.ld_l = 1; pushes++; end
      else if (m && !r) begin e.clr = 1; handovers++; end
      else e.rfsh = 1;
      checks++;
      if (occ != m || ctl != e || push_ready != exp_ready) begin
        failures++;
        $display("FAIL push=%b full=%b r=%b occ=%b/%b ctl=%b/%b ready=%b/%b",
                 push, full, r, occ, m, ctl, e, push_ready, exp_ready);
      end
      if (e.ld_l) m = 1; else if (e.clr) m = 0;
    end
    checks++;
    if (pushes == 0 || handovers == 0) begin
      failures++;
      $display("FAIL pushes=%0d handovers=%0d", pushes, handovers);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

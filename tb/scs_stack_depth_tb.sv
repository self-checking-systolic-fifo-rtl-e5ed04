// scs_stack_depth_tb: the stack's speed does not depend on its capacity.
//
// Stacks of 8, 16, 64 and 256 cells run the same random request stream
// (bursts of pushes and pops at changing rates) side by side, each checked
// against its own LIFO model. The longest pop wait and push wait must be the
// same small constant at every depth (at most 4 and 2 cycles).
module scs_stack_depth_tb;
  localparam int NDEPTH = 4;
  localparam int unsigned DEPTHS [NDEPTH] = '{8, 16, 64, 256};

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [31:0] push_data = '0;
  int h_checks [NDEPTH], h_failures [NDEPTH], h_pops [NDEPTH];
  int h_pop_wait [NDEPTH], h_push_wait [NDEPTH];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < NDEPTH; d++) begin : g_depth
    stack_harness #(.N(DEPTHS[d])) u_h (
      .clk, .rst_n, .push, .pop, .push_data,
      .checks(h_checks[d]), .failures(h_failures[d]), .pops(h_pops[d]),
      .pop_wait_max(h_pop_wait[d]), .push_wait_max(h_push_wait[d])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p_push, p_pop;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int blk = 0; blk < 300; blk++) begin
      // Mix long one-sided bursts (deep fills and drains) with random mixes.
      case (blk % 4)
        0: begin p_push = 100; p_pop = 0; end
        1: begin p_push = 0; p_pop = 100; end
        default: begin p_push = $urandom % 101; p_pop = $urandom % 101; end
      endcase
      repeat (($urandom % 300) + 20) begin
        @(negedge clk);
        push = ($urandom % 100) < p_push;
        pop = ($urandom % 100) < p_pop;
        push_data = $urandom;
      end
    end
    @(negedge clk);
    push = 0;
    pop = 0;
    @(negedge clk);
    for (int d = 0; d < NDEPTH; d++) begin
      $display("  N=%0d: pops %0d, longest pop wait %0d, longest push wait %0d",
               DEPTHS[d], h_pops[d], h_pop_wait[d], h_push_wait[d]);
      checks += h_checks[d] + 3;
      failures += h_failures[d];
      if (h_pops[d] == 0) begin failures++; $display("FAIL N=%0d no pops", DEPTHS[d]); end
      if (h_pop_wait[d] > 4 || h_pop_wait[d] != h_pop_wait[0]) begin
        failures++;
        $display("FAIL N=%0d pop wait %0d", DEPTHS[d], h_pop_wait[d]);
      end
      if (h_push_wait[d] > 2 || h_push_wait[d] != h_push_wait[0]) begin
        failures++;
        $display("FAIL N=%0d push wait %0d", DEPTHS[d], h_push_wait[d]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

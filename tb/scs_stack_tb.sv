// scs_stack_tb: end-to-end test of the self-checking systolic stack.
//
// Runs the stack at its default size (32-bit words, 16 cells) against a
// queue model of a LIFO. Phases: fill until the stack refuses pushes, drain
// until it refuses pops, a long random mix with changing push/pop rates, and
// error injection, where a unidirectional error is forced into the top
// cell's stored codeword just before a pop and the two-rail error pair must
// flag it. Every pop is compared with the model and must come with a clean
// error pair otherwise. A sustained stream of pushes or of pops must be
// served at one word per 3 cycles. Invariants checked every cycle: empty, full and the
// two ready flags agree with the model's word count, and the error pair is
// a clean code word whenever no error is injected, idle cycles included.
//
// Each mechanism is counted and must occur at least once: push, pop, push and
// pop in one cycle, push refused while full, pop refused while empty, pop
// held back by a word still in the temporary cell, hand-over from the
// temporary cell to the top, Rule 1 and Rule 2 moves, and a detected error.
// The longest wait from a pop request (non-empty stack) to its service, and
// from a push request (room left) to its acceptance, are measured and must
// stay within 4 and 2 cycles; these bounds do not depend on the depth.
module scs_stack_tb;
  import scs_pkg::*;
  localparam int unsigned I = 32;
  localparam int unsigned N = 16;
  localparam int unsigned K = berger_k(I);
  localparam int unsigned POP_WAIT_MAX = 4;
  localparam int unsigned PUSH_WAIT_MAX = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [I-1:0] push_data = '0;
  logic push_ready, pop_ready, full, empty;
  logic [I-1:0] pop_data;
  logic [K-1:0] pop_check;
  logic [1:0] err;

  logic [I-1:0] model [$];

  typedef enum int {
    M_PUSH, M_POP, M_BOTH, M_FULL_REFUSE, M_EMPTY_REFUSE, M_POP_HELD,
    M_HANDOVER, M_RULE1, M_RULE2, M_ERR_DETECT, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"push", "pop", "push+pop", "push refused (full)",
      "pop refused (empty)", "pop held by temporary word", "temporary->top hand-over",
      "Rule 1 move", "Rule 2 move", "error detected"};

  int pop_wait = 0, push_wait = 0, pop_wait_max = 0, push_wait_max = 0;
  int cycle = 0;

  scs_stack dut (
    .clk, .rst_n, .push, .push_data, .push_ready, .pop, .pop_ready,
    .pop_data, .pop_check, .err, .full, .empty
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  // Count the moves made by the state controllers on the coming edge.
  task automatic count_moves();
    if (dut.ctl[1].ld_l) mech[M_HANDOVER]++;
    for (int c = 2; c <= N; c++) if (dut.ctl[c].ld_l) mech[M_RULE1]++;
    for (int c = 1; c < N; c++)  if (dut.ctl[c].ld_r) mech[M_RULE2]++;
  endtask

  // One clock cycle with the given requests; checks and model update.
  // inject: force a unidirectional error into the top codeword if a pop goes.
  task automatic step(bit want_push, bit want_pop, bit inject = 0);
    logic [I+K-1:0] cw, bad;
    bit do_push, do_pop, injected;
    injected = 0;
    @(negedge clk);
    cycle++;
    push = want_push;
    pop = want_pop;
    push_data = $urandom;
    #1;
    // invariants
    checks++;
    if (empty != (model.size() == 0)) fail($sformatf("empty=%b with %0d words", empty, model.size()));
    if (push_ready && model.size() >= N) fail("push_ready with no room");
    if (pop_ready && model.size() == 0) fail("pop_ready with no word");
    if (full && model.size() < N) fail("full with room left");
    if (model.size() > N) fail("model overflow");
    // C1 always holds a valid codeword (a word or the clear word), so the
    // checker must read "no error" in every cycle without injection.
    if (err[1] == err[0]) fail($sformatf("error pair %b without an injected error", err));
    do_push = push && push_ready;
    do_pop = pop && pop_ready;
    if (push && !push_ready && full) mech[M_FULL_REFUSE]++;
    if (pop && !pop_ready && model.size() == 0) mech[M_EMPTY_REFUSE]++;
    if (pop && !pop_ready && model.size() != 0 && dut.occ[0]) mech[M_POP_HELD]++;
    // waits
    if (pop && !do_pop && model.size() != 0) pop_wait++; else pop_wait = 0;
    if (push && !do_push && model.size() < N) push_wait++; else push_wait = 0;
    if (pop_wait > pop_wait_max) pop_wait_max = pop_wait;
    if (push_wait > push_wait_max) push_wait_max = push_wait;
    if (do_pop) begin
      logic [I-1:0] exp_word;
      exp_word = model.pop_back();
      mech[M_POP]++;
      if (inject) begin
        cw = {pop_check, pop_data};
        // 1->0 flips of some of the 1 bits, or 0->1 flips of some 0 bits.
        if ($urandom % 2) bad = cw & ~(cw & 38'({$urandom, $urandom} | (64'h1 << ($urandom % 38))));
        else              bad = cw | (~cw & 38'({$urandom, $urandom} | (64'h1 << ($urandom % 38))));
        if (bad != cw) begin
          force dut.u_array.g_col[1].u_col.q = bad;
          injected = 1;
          #1;
        end
      end
      checks++;
      if (injected) begin
        if (err[1] != err[0]) fail($sformatf("error not detected: %h -> %h err=%b", cw, bad, err));
        else mech[M_ERR_DETECT]++;
      end else begin
        if (pop_data != exp_word) fail($sformatf("pop data %h expected %h", pop_data, exp_word));
        if (err[1] == err[0]) fail($sformatf("false error alarm err=%b", err));
        if (pop_check != K'(I - $countones(exp_word))) fail("stored check symbol wrong");
      end
    end
    if (do_push) begin
      model.push_back(push_data);
      mech[M_PUSH]++;
    end
    if (do_push && do_pop) mech[M_BOTH]++;
    count_moves();
    // Release before the edge: the pop on that edge clears the cell, so the
    // corrupted word leaves with the pop.
    if (injected) release dut.u_array.g_col[1].u_col.q;
    @(posedge clk);
  endtask

  initial begin
    int p_push, p_pop, fill_cycles, drain_cycles;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Fill until refused, then a little longer. A sustained stream of
    // pushes is taken at one push per 3 cycles, so N words need at most 3N.
    fill_cycles = 0;
    repeat (4 * N) begin
      step(1, 0);
      if (model.size() < N) fill_cycles++;
    end
    checks++;
    if (model.size() != N || !full) fail($sformatf("fill ended with %0d words", model.size()));
    checks++;
    if (fill_cycles + 1 > 3 * N) fail($sformatf("fill took %0d cycles", fill_cycles + 1));
    // Drain until refused; pops are also served at one per 3 cycles.
    drain_cycles = 0;
    repeat (4 * N) begin
      step(0, 1);
      if (model.size() > 0) drain_cycles++;
    end
    checks++;
    if (model.size() != 0 || !empty) fail($sformatf("drain ended with %0d words", model.size()));
    checks++;
    if (drain_cycles + 1 > 3 * N) fail($sformatf("drain took %0d cycles", drain_cycles + 1));
    $display("  fill of %0d words: %0d cycles, drain: %0d cycles", N, fill_cycles + 1, drain_cycles + 1);
    // Random mix with changing rates.
    for (int blk = 0; blk < 200; blk++) begin
      p_push = $urandom % 101;
      p_pop = $urandom % 101;
      repeat (100) step(($urandom % 100) < p_push, ($urandom % 100) < p_pop);
    end
    // Error injection on pops.
    repeat (2 * N) step(1, 0);
    for (int n = 0; n < 40; n++) begin
      int pops_before;
      pops_before = mech[M_POP];
      while (mech[M_POP] == pops_before) step(0, 1, 1);
      step(1, 0);
    end
    // Empty the stack and check all words come out.
    repeat (8 * N) step(0, 1);
    checks++;
    if (model.size() != 0) fail("stack not drained at end");
    for (int m = 0; m < M_COUNT; m++) begin
      $display("  %-28s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism never exercised: %s", mech_name[m]));
    end
    $display("  longest pop wait %0d cycles, longest push wait %0d cycles", pop_wait_max, push_wait_max);
    checks++;
    if (pop_wait_max > POP_WAIT_MAX) fail($sformatf("pop wait %0d exceeds %0d", pop_wait_max, POP_WAIT_MAX));
    checks++;
    if (push_wait_max > PUSH_WAIT_MAX) fail($sformatf("push wait %0d exceeds %0d", push_wait_max, PUSH_WAIT_MAX));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

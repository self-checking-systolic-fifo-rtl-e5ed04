// stack_harness: one scs_stack of depth N with its own LIFO model.
//
// Used by scs_stack_depth_tb to run several depths on the same request
// stream. On every cycle it applies the shared push/pop requests and data,
// checks every pop against its queue model (data and a clean error pair)
// and the ready/full/empty flags against the model's word count, and tracks
// the longest wait of a pending pop (non-empty stack) and of a pending push
// (room left). Results are read out through its output ports.
module stack_harness #(
  parameter int unsigned N = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic        pop,
  input  logic [31:0] push_data,
  output int          checks,
  output int          failures,
  output int          pops,
  output int          pop_wait_max,
  output int          push_wait_max
);
  logic push_ready, pop_ready, full, empty;
  logic [31:0] pop_data;
  logic [5:0] pop_check;
  logic [1:0] err;
  logic [31:0] model [$];
  int pop_wait, push_wait;

  scs_stack #(.N(N)) dut (
    .clk, .rst_n, .push, .push_data, .push_ready, .pop, .pop_ready,
    .pop_data, .pop_check, .err, .full, .empty
  );

  initial begin
    checks = 0;
    failures = 0;
    pops = 0;
    pop_wait = 0;
    push_wait = 0;
    pop_wait_max = 0;
    push_wait_max = 0;
  end

  // Sample just before the edge; requests change at the falling edge.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (empty != (model.size() == 0) || (push_ready && model.size() >= N) ||
          (pop_ready && model.size() == 0) || (full && model.size() < N)) begin
        failures++;
        $display("FAIL N=%0d flags empty=%b full=%b ready=%b%b words=%0d",
                 N, empty, full, push_ready, pop_ready, model.size());
      end
      if (pop && !pop_ready && model.size() != 0) pop_wait++; else pop_wait = 0;
      if (push && !push_ready && model.size() < N) push_wait++; else push_wait = 0;
      if (pop_wait > pop_wait_max) pop_wait_max = pop_wait;
      if (push_wait > push_wait_max) push_wait_max = push_wait;
      if (pop && pop_ready) begin
        logic [31:0] exp_word;
        exp_word = model.pop_back();
        pops++;
        checks++;
        if (pop_data != exp_word || err[1] == err[0]) begin
          failures++;
          $display("FAIL N=%0d pop %h expected %h err=%b", N, pop_data, exp_word, err);
        end
      end
      if (push && push_ready) model.push_back(push_data);
    end
  end
endmodule

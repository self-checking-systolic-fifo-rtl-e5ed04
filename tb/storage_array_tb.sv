// storage_array_tb: checks the word array against a model.
//
// A 5-column array (N = 4) of 38-bit words gets random one-hot controls per
// column and a random push word; the model array is updated from the old
// neighbour values as the hardware must be (C0's left input is the push word,
// CN's right input the clear word). Every word and the top-word output are
// compared after each clock edge.
module storage_array_tb;
  import scs_pkg::*;
  localparam int unsigned W = 38;
  localparam int unsigned N = 4;
  localparam logic [W-1:0] CLR = {6'd32, 32'd0};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cell_ctl_t [N:0] ctl;
  logic [W-1:0] push_word, top_word;
  logic [N:0][W-1:0] words;
  logic [W-1:0] model [N+1];
  logic [W-1:0] old [N+1];

  storage_array #(.W(W), .N(N), .CLEAR_WORD(CLR)) dut (
    .clk, .rst_n, .ctl, .push_word, .top_word, .words
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= N; c++) begin
      ctl[c] = '{clr: 1'b0, rfsh: 1'b1, ld_r: 1'b0, ld_l: 1'b0};
      model[c] = CLR;
    end
    push_word = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      push_word = {$urandom, $urandom};
      old = model;
      for (int c = 0; c <= N; c++) begin
        ctl[c] = cell_ctl_t'(4'b1 << ($urandom % 4));
        if (ctl[c].ld_l)      model[c] = (c == 0) ? push_word : old[c-1];
        else if (ctl[c].ld_r) model[c] = (c == N) ? CLR : old[c+1];
        else if (ctl[c].clr)  model[c] = CLR;
      end
      @(posedge clk);
      #1;
      for (int c = 0; c <= N; c++) begin
        checks++;
        if (words[c] != model[c]) begin
          failures++;
          $display("FAIL cycle %0d column %0d q=%h expected=%h", n, c, words[c], model[c]);
        end
      end
      checks++;
      if (top_word != model[1]) begin
        failures++;
        $display("FAIL top word %h expected %h", top_word, model[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

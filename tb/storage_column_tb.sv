// storage_column_tb: checks the four column controls against a model.
//
// Random one-hot controls and random neighbour words are applied for many
// cycles; after every clock edge the stored word must equal the model's.
// Reset must load the clear word.
module storage_column_tb;
  import scs_pkg::*;
  localparam int unsigned W = 38;
  localparam logic [W-1:0] CLR = {6'd32, 32'd0};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cell_ctl_t ctl;
  logic [W-1:0] from_l, from_r, q, model;

  storage_column #(.W(W), .CLEAR_WORD(CLR)) dut (.clk, .rst_n, .ctl, .from_l, .from_r, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl = '{clr: 1'b0, rfsh: 1'b1, ld_r: 1'b0, ld_l: 1'b0};
    from_l = '0;
    from_r = '0;
    #12;
    checks++;
    if (q != CLR) begin
      failures++;
      $display("FAIL reset value %h", q);
    end
    rst_n = 1;
    model = CLR;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ctl = cell_ctl_t'(4'b1 << ($urandom % 4));
      from_l = {$urandom, $urandom};
      from_r = {$urandom, $urandom};
      if (ctl.ld_l)      model = from_l;
      else if (ctl.ld_r) model = from_r;
      else if (ctl.clr)  model = CLR;
      @(posedge clk);
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL cycle %0d ctl=%b q=%h expected=%h", n, ctl, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

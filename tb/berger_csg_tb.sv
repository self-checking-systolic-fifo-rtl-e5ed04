// berger_csg_tb: checks the zero counter against an independent count.
//
// Drives the corner words (all zeros, all ones, single bits) and random words
// at the default 32-bit size, plus 7-bit (maximal-length, k = 3) and 6-bit
// (non-maximal, k = 3) instances with two worked codewords, and compares the
// symbol with the info width minus $countones(word).
module berger_csg_tb;
  int checks = 0, failures = 0;
  logic [31:0] d32;
  logic [5:0]  c32;
  logic [6:0]  d7;
  logic [2:0]  c7;
  logic [5:0]  d6;
  logic [2:0]  c6;

  berger_csg                u32 (.data(d32), .check(c32));
  berger_csg #(.I(7), .K(3)) u7 (.data(d7), .check(c7));
  berger_csg #(.I(6), .K(3)) u6 (.data(d6), .check(c6));

  task automatic check32(input logic [31:0] v);
    d32 = v;
    #1;
    checks++;
    if (c32 != 6'(32 - $countones(v))) begin
      failures++;
      $display("FAIL data=%h check=%0d expected=%0d", v, c32, 32 - $countones(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32('0);
    check32('1);
    for (int b = 0; b < 32; b++) begin
      check32(32'h1 << b);
      check32(~(32'h1 << b));
    end
    for (int n = 0; n < 2000; n++) check32($urandom);
    // Maximal-length example (I = 7, k = 3): codeword 1100101 011.
    // Non-maximal example (I = 6, k = 3): codeword 110100 011.
    d7 = 7'b1100101;
    d6 = 6'b110100;
    #1;
    checks += 2;
    if (c7 != 3'b011) begin failures++; $display("FAIL 1100101 -> %b", c7); end
    if (c6 != 3'b011) begin failures++; $display("FAIL 110100 -> %b", c6); end
    for (int v = 0; v < 128; v++) begin
      d7 = 7'(v);
      #1;
      checks++;
      if (c7 != 3'(7 - $countones(7'(v)))) begin
        failures++;
        $display("FAIL 7-bit data=%b check=%0d", d7, c7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

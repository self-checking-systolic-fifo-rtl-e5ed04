// two_rail_checker_tb: checks the two-rail checker tree.
//
// For N = 6 (the default) and N = 3 every combination of input rails is
// applied: the output must be complementary exactly when all input pairs are
// complementary. It also checks that the valid inputs drive both output
// codes 01 and 10, as a totally self-checking checker must.
module two_rail_checker_tb;
  int checks = 0, failures = 0;
  logic [5:0] x6, y6;
  logic [2:0] x3, y3;
  logic [1:0] z6, z3;
  bit seen10, seen01;

  two_rail_checker           u6 (.x(x6), .y(y6), .z(z6));
  two_rail_checker #(.N(3))  u3 (.x(x3), .y(y3), .z(z3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {x6, y6} = 12'(v);
      #1;
      checks++;
      if ((z6[1] ^ z6[0]) != ((x6 ^ y6) == 6'h3f)) begin
        failures++;
        $display("FAIL N=6 x=%b y=%b z=%b", x6, y6, z6);
      end
      if ((x6 ^ y6) == 6'h3f) begin
        if (z6 == 2'b10) seen10 = 1;
        if (z6 == 2'b01) seen01 = 1;
      end
    end
    checks++;
    if (!(seen10 && seen01)) begin
      failures++;
      $display("FAIL valid inputs do not exercise both output codes");
    end
    for (int v = 0; v < 64; v++) begin
      {x3, y3} = 6'(v);
      #1;
      checks++;
      if ((z3[1] ^ z3[0]) != ((x3 ^ y3) == 3'h7)) begin
        failures++;
        $display("FAIL N=3 x=%b y=%b z=%b", x3, y3, z3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

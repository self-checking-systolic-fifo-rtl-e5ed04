// berger_checker_tb: checks error detection on Berger codewords.
//
// Random 32-bit words get their check symbol computed here (32 minus the
// number of ones). Clean codewords must give a complementary error pair.
// Codewords hit by a random unidirectional error (some 1s turned to 0s, or
// some 0s to 1s, across data and check bits) must give 00 or 11.
module berger_checker_tb;
  int checks = 0, failures = 0;
  logic [31:0] data;
  logic [5:0]  check;
  logic [1:0]  err;

  berger_checker dut (.data, .check, .err);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [37:0] cw, mask;
    for (int n = 0; n < 3000; n++) begin
      data  = $urandom;
      if (n < 2) data = n[0] ? '1 : '0;
      check = 6'(32 - $countones(data));
      cw    = {check, data};
      #1;
      checks++;
      if (err[1] == err[0]) begin
        failures++;
        $display("FAIL false alarm data=%h check=%0d err=%b", data, check, err);
      end
      // Unidirectional error: a random non-empty mask applied in one direction.
      mask = 38'({$urandom, $urandom} & {$urandom, $urandom});
      if (n % 3 == 0) mask = 38'h1 << ($urandom % 38);
      if (n % 2 == 0) mask &= cw;    // 1 -> 0 flips
      else            mask &= ~cw;   // 0 -> 1 flips
      if (mask == '0) continue;
      {check, data} = (n % 2 == 0) ? (cw & ~mask) : (cw | mask);
      #1;
      checks++;
      if (err[1] != err[0]) begin
        failures++;
        $display("FAIL missed error cw=%h mask=%h err=%b", cw, mask, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

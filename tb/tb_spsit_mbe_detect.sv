// Self-checking testbench for spsit_mbe_detect.
// Draws multipliers of every effective length, computes the Booth digits of
// each by the recoding formula, and checks that the two flags report exactly
// whether digits 4..7 and digits 6..7 are all zero.
module tb_spsit_mbe_detect;
  logic [15:0] b;
  logic zero_hi4, zero_hi2;
  int checks = 0, failures = 0;
  int n4 = 0, n2 = 0;

  spsit_mbe_detect #(.W(16)) dut (.b(b), .zero_hi4(zero_hi4), .zero_hi2(zero_hi2));

  function automatic int digit(logic [15:0] v, int i);
    logic [16:0] x;
    x = {v, 1'b0};
    return -2 * int'(x[2*i+2]) + int'(x[2*i+1]) + int'(x[2*i]);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int len;
      logic exp4, exp2;
      len = 1 + (n % 16);
      b = 16'($signed(16'($urandom)) >>> (16 - len));  // sign-extended len-bit value
      #1;
      exp4 = 1'b1;
      exp2 = 1'b1;
      for (int i = 4; i < 8; i++) if (digit(b, i) != 0) exp4 = 1'b0;
      for (int i = 6; i < 8; i++) if (digit(b, i) != 0) exp2 = 1'b0;
      checks += 2;
      if (zero_hi4 !== exp4 || zero_hi2 !== exp2) begin
        failures++;
        $display("FAIL b=%h hi4=%b/%b hi2=%b/%b", b, zero_hi4, exp4, zero_hi2, exp2);
      end
      n4 += int'(exp4);
      n2 += int'(exp2 && !exp4);
    end
    if (n4 == 0 || n2 == 0) begin
      failures++;
      $display("FAIL a case never happened: hi4 %0d hi2-only %0d", n4, n2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for booth_encoder.
// Checks all eight triplets against the bit-pair recoding table, that a zero
// digit is never negative, and recodes the multiplier 0x006A, whose digits
// from the most significant down are 0 0 0 0 +2 -1 -1 -2.
module tb_booth_encoder;
  import spsit_pkg::*;

  logic [2:0]   triplet;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_encoder dut (.triplet(triplet), .digit(digit));

  // Independent reference: value = -2*b(i+1) + b(i) + b(i-1).
  function automatic int ref_val(logic [2:0] t);
    return -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    logic [16:0] bx;
    int exp_digits [8] = '{-2, -1, -1, 2, 0, 0, 0, 0};
    for (int t = 0; t < 8; t++) begin
      triplet = 3'(t);
      #1;
      check($sformatf("triplet %03b value", t), booth_value(digit), ref_val(3'(t)));
      check($sformatf("triplet %03b one-hot", t), int'(digit.one & digit.two), 0);
      if (ref_val(3'(t)) == 0) check($sformatf("triplet %03b zero sign", t), int'(digit.neg), 0);
    end
    bx = {16'h006A, 1'b0};
    for (int i = 0; i < 8; i++) begin
      triplet = bx[2*i +: 3];
      #1;
      check($sformatf("0x006A digit %0d", i), booth_value(digit), exp_digits[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for booth_pp_mux.
// For random and extreme multiplicands and every Booth digit, checks that the
// MUX returns digit * A.
module tb_booth_pp_mux;
  import spsit_pkg::*;

  localparam int W = 16;
  logic signed [W+1:0]   p1, p2, m1, m2, pp;
  booth_digit_t        digit;
  int checks = 0, failures = 0;

  booth_pp_mux #(.W(W)) dut (
    .cand_p1(p1), .cand_p2(p2), .cand_m1(m1), .cand_m2(m2), .digit(digit), .pp(pp)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    booth_digit_t digits [5];
    int           vals   [5] = '{0, 1, 2, -1, -2};
    logic signed [W-1:0] a;
    digits[0] = '{neg: 1'b0, two: 1'b0, one: 1'b0};
    digits[1] = '{neg: 1'b0, two: 1'b0, one: 1'b1};
    digits[2] = '{neg: 1'b0, two: 1'b1, one: 1'b0};
    digits[3] = '{neg: 1'b1, two: 1'b0, one: 1'b1};
    digits[4] = '{neg: 1'b1, two: 1'b1, one: 1'b0};
    for (int n = 0; n < 400; n++) begin
      case (n)
        0: a = 16'sh7FFF;
        1: a = -16'sh8000;
        2: a = '0;
        3: a = -16'sd1;
        default: a = W'($urandom);
      endcase
      p1 = 18'(a);
      p2 = 18'(a) * 2;
      m1 = -18'(a);
      m2 = -18'(a) * 2;
      for (int d = 0; d < 5; d++) begin
        digit = digits[d];
        #1;
        checks++;
        if (int'(pp) != vals[d] * int'(a)) begin
          failures++;
          $display("FAIL a=%0d digit=%0d pp=%0d", a, vals[d], pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

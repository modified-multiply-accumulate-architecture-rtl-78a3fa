// Self-checking testbench for csa_3to2: sum + carry must equal x + y + z
// modulo 2^W, and sum must be the bitwise parity of the inputs.
module tb_csa_3to2;
  localparam int W = 32;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_3to2 #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      x = n == 0 ? '1 : $urandom;
      y = n == 0 ? '1 : $urandom;
      z = n == 0 ? '1 : $urandom;
      #1;
      checks += 2;
      if (W'(s + c) !== W'(x + y + z)) begin
        failures++;
        $display("FAIL total x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
      if (s !== (x ^ y ^ z)) begin
        failures++;
        $display("FAIL parity");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

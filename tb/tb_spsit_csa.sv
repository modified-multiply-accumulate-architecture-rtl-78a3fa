// Self-checking testbench for spsit_csa (AND and register asserting styles).
// Each cycle new rows are applied after the rising edge, the AND strobe rises
// 3 time units later, and after the falling edge both instances must give
// sum + carry = x + y + z (mod 2^32), and close must be set exactly when all
// three upper halves are sign extension. With the strobe held high it also
// checks that the MSP input latches hold while x, y, z change among
// sign-extended values.
module tb_spsit_csa;
  import spsit_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0, assert_en = 1'b0;
  logic [W-1:0] x, y, z, s_a, c_a, s_r, c_r;
  logic cl_a, cl_r;
  int checks = 0, failures = 0, n_close = 0, n_open = 0, n_held = 0;

  spsit_csa #(.W(W), .LSP_W(16), .STYLE(ASSERT_AND)) dut_and (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .x(x), .y(y), .z(z),
    .sum(s_a), .carry(c_a), .close(cl_a));
  spsit_csa #(.W(W), .LSP_W(16), .STYLE(ASSERT_REG)) dut_reg (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .x(x), .y(y), .z(z),
    .sum(s_r), .carry(c_r), .close(cl_r));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ext(logic [W-1:0] v);
    return v[W-1:16] == '0 || v[W-1:16] == '1;
  endfunction

  function automatic logic [W-1:0] pick(int k);
    case (k % 3)
      0:       return $urandom;
      default: return W'($signed($urandom) >>> (16 + $urandom % 16));
    endcase
  endfunction

  initial begin
    x = '0; y = '0; z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic exp_close;
      @(posedge clk);
      #1 assert_en = 1'b0;
      x = pick($urandom); y = pick($urandom); z = pick($urandom);
      #1;
      checks++;
      if (W'(s_a + c_a) !== W'(x + y + z) || cl_a) begin
        failures++;
        $display("FAIL and style before strobe");
      end
      #1 assert_en = 1'b1;
      @(negedge clk);
      #1;
      exp_close = ext(x) && ext(y) && ext(z);
      checks += 4;
      if (W'(s_a + c_a) !== W'(x + y + z)) begin failures++; $display("FAIL and total x=%h y=%h z=%h", x, y, z); end
      if (W'(s_r + c_r) !== W'(x + y + z)) begin failures++; $display("FAIL reg total x=%h y=%h z=%h", x, y, z); end
      if (s_a !== (x ^ y ^ z)) begin failures++; $display("FAIL and parity x=%h y=%h z=%h", x, y, z); end
      if (cl_a !== exp_close || cl_r !== exp_close) begin failures++; $display("FAIL close"); end
      if (exp_close) n_close++; else n_open++;
    end
    begin
      logic [15:0] held;
      @(posedge clk);
      #1 x = 32'h0000_0100; y = 32'hFFFF_FF00; z = 32'h0000_0003;
      #1 assert_en = 1'b1;
      #1 held = dut_and.x_lat;
      for (int n = 0; n < 20; n++) begin
        x = W'($signed($urandom) >>> 20);
        y = W'($signed($urandom) >>> 20);
        z = W'($signed($urandom) >>> 20);
        #1;
        checks += 2;
        if (dut_and.x_lat !== held || !cl_a) begin failures++; $display("FAIL MSP latch did not hold"); end
        else n_held++;
        if (W'(s_a + c_a) !== W'(x + y + z)) begin failures++; $display("FAIL total while frozen"); end
      end
    end
    $display("closed %0d open %0d held %0d", n_close, n_open, n_held);
    if (n_close == 0 || n_open == 0 || n_held == 0) begin
      failures++;
      $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

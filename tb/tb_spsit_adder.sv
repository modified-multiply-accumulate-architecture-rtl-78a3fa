// Self-checking testbench for spsit_adder.
// Runs a 16-bit adder (8/8 split) in both asserting styles and a 32-bit one
// (16/16 split) in the AND style. Each cycle a new operand pair is applied
// after the rising edge; the AND strobe rises 3 time units later, and all
// outputs are checked after the falling edge against a + b + cin or a - b.
// Covered: the six sign-extension examples (positive/positive, mixed signs
// with and without LSP carry, negative/negative with and without carry),
// random short and long operands, subtraction, and that latch A holds its
// value while the adder stays closed.
module tb_spsit_adder;
  import spsit_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, assert_en = 1'b0;
  logic [15:0] a, b;
  logic [31:0] a32, b32;
  logic        sub, cin;
  logic [15:0] s_and, s_reg;
  logic [31:0] s32;
  logic        co_and, co_reg, co32;
  spsit_ctrl_t k_and, k_reg, k32;
  int checks = 0, failures = 0;
  int n_close = 0, n_open = 0, n_both_neg = 0, n_mixed_carry = 0, n_sub = 0, n_held = 0;

  spsit_adder #(.W(16), .LSP_W(8), .STYLE(ASSERT_AND)) dut_and (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .a(a), .b(b), .sub(sub), .cin(cin),
    .sum(s_and), .cout(co_and), .ctrl(k_and));
  spsit_adder #(.W(16), .LSP_W(8), .STYLE(ASSERT_REG)) dut_reg (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .a(a), .b(b), .sub(sub), .cin(cin),
    .sum(s_reg), .cout(co_reg), .ctrl(k_reg));
  spsit_adder #(.W(32), .LSP_W(16), .STYLE(ASSERT_AND)) dut32 (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .a(a32), .b(b32), .sub(sub), .cin(cin),
    .sum(s32), .cout(co32), .ctrl(k32));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic pred(logic [15:0] v);
    return v[15:8] == 8'h00 || v[15:8] == 8'hFF;
  endfunction

  task automatic apply_and_check(logic [15:0] va, logic [15:0] vb, logic vsub, logic vcin);
    logic [16:0] exp;
    logic [32:0] exp32;
    logic [15:0] beff;
    logic        exp_close;
    @(posedge clk);
    #1;
    assert_en = 1'b0;
    a = va; b = vb; sub = vsub; cin = vcin;
    a32 = {{16{va[15]}}, va} ^ {16'($urandom % 2 ? 16'h0 : 16'h1234), 16'h0};
    b32 = 32'($urandom);
    #1;
    // Before the strobe the AND-style adder must already be exact (nothing closed).
    beff = vsub ? ~vb : vb;
    exp  = {1'b0, va} + {1'b0, beff} + 17'(vsub ? 1'b1 : vcin);
    checks++;
    if ({co_and, s_and} !== exp || k_and.close) begin
      failures++;
      $display("FAIL before strobe a=%h b=%h sub=%b got %b%h exp %h", va, vb, vsub, co_and, s_and, exp);
    end
    #2 assert_en = 1'b1;
    @(negedge clk);
    #1;
    exp_close = pred(va) && pred(beff);
    exp32 = {1'b0, a32} + {1'b0, vsub ? ~b32 : b32} + 33'(vsub ? 1'b1 : vcin);
    checks += 5;
    if ({co_and, s_and} !== exp) begin
      failures++;
      $display("FAIL and a=%h b=%h sub=%b cin=%b got %b%h exp %h", va, vb, vsub, vcin, co_and, s_and, exp);
    end
    if ({co_reg, s_reg} !== exp) begin
      failures++;
      $display("FAIL reg a=%h b=%h sub=%b cin=%b got %b%h exp %h", va, vb, vsub, vcin, co_reg, s_reg, exp);
    end
    if ({co32, s32} !== exp32) begin
      failures++;
      $display("FAIL 32-bit a=%h b=%h got %b%h exp %h", a32, b32, co32, s32, exp32);
    end
    if (k_and.close !== exp_close) begin
      failures++;
      $display("FAIL and close a=%h b=%h got %b exp %b", va, vb, k_and.close, exp_close);
    end
    if (k_reg.close !== exp_close) begin
      failures++;
      $display("FAIL reg close a=%h b=%h got %b exp %b", va, vb, k_reg.close, exp_close);
    end
    if (exp_close) n_close++; else n_open++;
    if (exp_close && va[15] && beff[15]) n_both_neg++;
    if (exp_close && (va[15] ^ beff[15]) && exp[16]) n_mixed_carry++;
    if (vsub) n_sub++;
  endtask

  initial begin
    logic [15:0] fa [6] = '{16'd128, -16'sd128, -16'sd61, -16'sd196, -16'sd61, -16'sd196};
    logic [15:0] fb [6] = '{16'd64,   16'd192,   16'd51,   16'd204, -16'sd205, -16'sd52};
    a = '0; b = '0; a32 = '0; b32 = '0; sub = 1'b0; cin = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) apply_and_check(fa[i], fb[i], 1'b0, 1'b0);
    // The same examples as subtractions of the negated operand.
    for (int i = 0; i < 6; i++) apply_and_check(fa[i], -fb[i], 1'b1, 1'b0);
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] va, vb;
      va = (n % 3 == 0) ? 16'($urandom) : 16'($signed(16'($urandom)) >>> ($urandom % 16));
      vb = (n % 5 == 0) ? 16'($urandom) : 16'($signed(16'($urandom)) >>> ($urandom % 16));
      apply_and_check(va, vb, 1'($urandom), 1'($urandom));
    end
    // Latch A must hold while the adder stays closed with the strobe high.
    begin
      logic [7:0] held;
      @(posedge clk);
      #1 a = 16'h0012; b = 16'h0034; sub = 1'b0; cin = 1'b0; assert_en = 1'b0;
      #1 assert_en = 1'b1;
      #1 held = dut_and.a_lat;
      for (int n = 0; n < 20; n++) begin
        #1 a = (n % 2) ? 16'hFF80 + 16'(n) : 16'h0001 + 16'(n);
        b = 16'($urandom % 128);
        #1;
        checks += 2;
        if (dut_and.a_lat !== held || !k_and.close) begin
          failures++;
          $display("FAIL latch A did not hold");
        end else n_held++;
        if (s_and !== 16'(a + b)) begin
          failures++;
          $display("FAIL closed sum a=%h b=%h got %h", a, b, s_and);
        end
      end
    end
    $display("cases: closed %0d open %0d both-negative %0d mixed-with-carry %0d sub %0d held %0d",
             n_close, n_open, n_both_neg, n_mixed_carry, n_sub, n_held);
    if (n_close == 0 || n_open == 0 || n_both_neg == 0 || n_mixed_carry == 0 || n_sub == 0 || n_held == 0) begin
      failures++;
      $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

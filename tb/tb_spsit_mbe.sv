// Self-checking testbench for spsit_mbe.
// Both asserting styles. Each operand pair is loaded on a rising edge; the
// AND strobe falls at that edge and rises 3 time units later. After the
// falling edge the eight partial product rows must add up to a * b, each row
// must equal digit_i * a * 4^i, and the freeze flags must say whether b fits
// in 8 or 12 bits. Some cycles load nothing, and the registered operands must
// then stay. It also checks that the candidate latches of MUX-4..7 hold while
// frozen and new values of a are loaded.
module tb_spsit_mbe;
  import spsit_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, assert_en = 1'b0, load = 1'b0;
  logic [15:0] a, b, last_a, last_b;
  logic [31:0] pp_and [8];
  logic [31:0] pp_reg [8];
  logic f4_and, f2_and, f4_reg, f2_reg;
  int checks = 0, failures = 0;
  int n4 = 0, n2 = 0, nfull = 0, n_held = 0;

  spsit_mbe #(.W(16), .PP_W(32), .STYLE(ASSERT_AND)) dut_and (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .load(load), .a_in(a), .b_in(b),
    .pp(pp_and), .freeze_hi4(f4_and), .freeze_hi2(f2_and));
  spsit_mbe #(.W(16), .PP_W(32), .STYLE(ASSERT_REG)) dut_reg (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .load(load), .a_in(a), .b_in(b),
    .pp(pp_reg), .freeze_hi4(f4_reg), .freeze_hi2(f2_reg));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(logic [15:0] v, int i);
    logic [16:0] x;
    x = {v, 1'b0};
    return -2 * int'(x[2*i+2]) + int'(x[2*i+1]) + int'(x[2*i]);
  endfunction

  task automatic check_rows(string tag, logic [31:0] pp [8], logic [15:0] va, logic [15:0] vb);
    logic [31:0] total, prod;
    total = '0;
    for (int i = 0; i < 8; i++) begin
      logic [31:0] exp_row;
      exp_row = 32'(longint'(digit(vb, i)) * longint'($signed(va)) * (longint'(1) << (2 * i)));
      checks++;
      if (pp[i] !== exp_row) begin
        failures++;
        $display("FAIL %s row %0d a=%h b=%h got %h exp %h", tag, i, va, vb, pp[i], exp_row);
      end
      total += pp[i];
    end
    prod = 32'($signed(va) * $signed(vb));
    checks++;
    if (total !== prod) begin
      failures++;
      $display("FAIL %s product a=%h b=%h got %h exp %h", tag, va, vb, total, prod);
    end
  endtask

  initial begin
    a = '0; b = '0; last_a = '0; last_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] va, vb;
      logic e4, e2;
      va = (n < 4) ? ((n % 2) ? 16'h8000 : 16'h7FFF) : 16'($urandom);
      vb = (n == 0) ? 16'h006A : 16'($signed(16'($urandom)) >>> ($urandom % 16));
      if (n == 0) va = 16'h2AC9;
      if (n > 0 && $urandom % 8 == 0) begin
        // Idle cycle: the registers must keep the previous operands.
        va = last_a; vb = last_b;
        a = 16'($urandom); b = 16'($urandom); load = 1'b0;
      end else begin
        a = va; b = vb; load = 1'b1;
        last_a = va; last_b = vb;
      end
      @(posedge clk);
      assert_en = 1'b0;
      #1 load = 1'b0;
      #2 assert_en = 1'b1;
      @(negedge clk);
      #1;
      check_rows("and", pp_and, va, vb);
      check_rows("reg", pp_reg, va, vb);
      e4 = vb[15:7] == '0 || vb[15:7] == '1;
      e2 = vb[15:11] == '0 || vb[15:11] == '1;
      checks++;
      if (f4_and !== e4 || f2_and !== e2 || f4_reg !== e4 || f2_reg !== e2) begin
        failures++;
        $display("FAIL freeze flags b=%h", vb);
      end
      if (e4) n4++; else if (e2) n2++; else nfull++;
      if (n == 0) begin
        checks++;
        if (32'(pp_and[0] + pp_and[1] + pp_and[2] + pp_and[3]) !== 32'h0011B73A) begin
          failures++;
          $display("FAIL 2AC9 x 006A");
        end
      end
    end
    // With the strobe high and b short, a may change without disturbing the
    // frozen candidate inputs of MUX-4..7.
    begin
      logic [71:0] held4;
      logic [15:0] va;
      b = 16'h0035; a = 16'h1111; load = 1'b1;
      @(posedge clk);
      #1 load = 1'b0;
      #1 assert_en = 1'b1;
      #1 held4 = dut_and.cand_hi4;
      for (int n = 0; n < 20; n++) begin
        va = 16'($urandom);
        a = va; load = 1'b1;
        @(posedge clk);
        #1 load = 1'b0;
        a = 16'($urandom);
        #1;
        checks += 2;
        if (dut_and.cand_hi4 !== held4) begin
          failures++;
          $display("FAIL MUX-4..7 inputs not held");
        end else n_held++;
        if (32'(pp_and[0] + pp_and[1] + pp_and[2] + pp_and[3] + pp_and[4] + pp_and[5] + pp_and[6] + pp_and[7])
            !== 32'($signed(va) * $signed(b))) begin
          failures++;
          $display("FAIL product while frozen");
        end
      end
    end
    $display("cases: hi4 frozen %0d hi2 only %0d none %0d held %0d", n4, n2, nfull, n_held);
    if (n4 == 0 || n2 == 0 || nfull == 0 || n_held == 0) begin
      failures++;
      $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for csa_tree: the sum and carry rows must add up
// to the total of all input rows modulo 2^W. Runs the default eight-row
// tree (SPSIT compressors split 16/16, AND-style asserting with the strobe
// toggled around the checks) and, for the generator, a plain nine-row and a
// two-row tree. Inputs alternate between random rows and rows that are
// small, sign-extended numbers, so that compressors close; how often some
// compressor closed and how often the first-level compressors were all
// closed are counted and must both be non-zero.
module tb_csa_tree;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0, assert_en = 1'b0;
  logic [W-1:0] r8 [8];
  logic [W-1:0] r9 [9];
  logic [W-1:0] r2 [2];
  logic [W-1:0] s8, c8, s9, c9, s2, c2;
  logic [5:0]   cl8;
  logic [6:0]   cl9;
  logic [0:0]   cl2;
  int checks = 0, failures = 0, n_any = 0, n_first = 0;

  csa_tree #(.W(W), .N_ROWS(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .rows(r8), .sum(s8), .carry(c8), .close(cl8));
  csa_tree #(.W(W), .N_ROWS(9), .SPSIT_LSP_W(0)) dut9 (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .rows(r9), .sum(s9), .carry(c9), .close(cl9));
  csa_tree #(.W(W), .N_ROWS(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .rows(r2), .sum(s2), .carry(c2), .close(cl2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] t8, t9, t2;
      t8 = '0; t9 = '0; t2 = '0;
      assert_en = 1'b0;
      for (int i = 0; i < 9; i++) begin
        logic [W-1:0] v;
        case (n % 4)
          0:       v = '1;
          1:       v = $urandom;
          default: v = W'($signed($urandom) >>> (17 + $urandom % 15));
        endcase
        if (i < 8) begin r8[i] = v; t8 += v; end
        r9[i] = v; t9 += v;
        if (i < 2) begin r2[i] = v; t2 += v; end
      end
      #1;
      checks += 2;
      if (W'(s8 + c8) !== t8 || cl8 !== '0) begin failures++; $display("FAIL 8-row tree before strobe"); end
      if (W'(s9 + c9) !== t9 || cl9 !== '0) begin failures++; $display("FAIL 9-row tree"); end
      assert_en = 1'b1;
      #1;
      checks += 2;
      if (W'(s8 + c8) !== t8) begin failures++; $display("FAIL 8-row tree, closes %b", cl8); end
      if (W'(s2 + c2) !== t2 || cl2 !== 1'b0) begin failures++; $display("FAIL 2-row tree"); end
      if (cl8 != '0) n_any++;
      if (cl8[1:0] == 2'b11) n_first++;
    end
    $display("some compressor closed %0d times, first level all closed %0d times", n_any, n_first);
    if (n_any == 0 || n_first == 0) begin
      failures++;
      $display("FAIL compressors never closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

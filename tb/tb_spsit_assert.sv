// Self-checking testbench for spsit_assert, both styles.
// AND style: the output must be raw AND assert_en at all times.
// Register style, falling edge: the output must take the raw value present at
// each falling clock edge and hold it until the next one, whatever raw does
// meanwhile. Register style, rising edge: the output must take raw at a
// rising edge only when load is high. Reset must clear the registers.
module tb_spsit_assert;
  import spsit_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0, assert_en = 1'b0;
  logic load = 1'b0;
  logic [N-1:0] raw = '0, q_reg, q_and, q_rise;
  int checks = 0, failures = 0;

  spsit_assert #(.N(N), .STYLE(ASSERT_REG)) dut_reg (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .load(1'b0), .raw(raw), .asserted(q_reg));
  spsit_assert #(.N(N), .STYLE(ASSERT_AND)) dut_and (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .load(1'b0), .raw(raw), .asserted(q_and));
  spsit_assert #(.N(N), .STYLE(ASSERT_REG), .RISE(1'b1)) dut_rise (
    .clk(clk), .rst_n(rst_n), .assert_en(assert_en), .load(load), .raw(raw), .asserted(q_rise));

  always #5 clk = ~clk;

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
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
    logic [N-1:0] held;
    raw = '1;
    repeat (2) @(negedge clk);
    #1 check("reset", q_reg, '0);
    check("reset rise", q_rise, '0);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      logic [N-1:0] prev_q, at_edge;
      logic         ld;
      prev_q = q_rise;
      at_edge = raw;
      ld = load;
      @(posedge clk);
      #1 check("rise style", q_rise, ld ? at_edge : prev_q);
      load = 1'($urandom);
      #1 raw = N'($urandom);
      assert_en = 1'($urandom);
      #1 check("and style", q_and, raw & {N{assert_en}});
      @(negedge clk);
      #1 check("reg samples at falling edge", q_reg, raw);
      held = raw;
      raw = ~raw;
      #1 check("reg holds", q_reg, held);
      check("and style follows", q_and, raw & {N{assert_en}});
      @(posedge clk);
      #1 check("reg holds over rising edge", q_reg, held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

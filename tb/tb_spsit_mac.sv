// End-to-end testbench for spsit_mac at its default parameters
// (16x16 operands, 32-bit accumulator, AND-style asserting logic).
//
// A stream of multiply-accumulate operations is fed in with random idle
// cycles. The strobe assert_en falls at every rising edge and rises 3 time
// units later, as an upper-level system would time it. A reference model
// keeps the expected accumulator; every out_valid is checked against it and
// must come exactly two rising edges after the operands were sampled.
// The stimulus contains the worked example 0x2AC9 * 0x006A, short and long
// multipliers, extreme operands and accumulator wrap-around. The testbench
// counts how often each mechanism was exercised (Booth rows 4..7 frozen,
// only rows 6..7 frozen, a tree compressor closed, final adder closed and
// open, accumulator cleared, accumulator wrapped) and counts a failure for
// any that never occurred.
module tb_spsit_mac;
  import spsit_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid = 1'b0, acc_clear = 1'b0, assert_en = 1'b0;
  logic signed [15:0] a = '0, b = '0;
  logic               out_valid;
  logic signed [31:0] acc;
  logic [3:0]         status;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_hi4 = 0, n_hi2 = 0, n_tree = 0, n_close = 0, n_open = 0, n_clear = 0, n_wrap = 0, n_ops = 0;

  spsit_mac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc_clear(acc_clear),
    .a(a), .b(b), .assert_en(assert_en),
    .out_valid(out_valid), .acc(acc), .status(status)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Asserting strobe: low from each rising edge until the data has settled.
  always begin
    @(posedge clk);
    assert_en = 1'b0;
    #3 assert_en = 1'b1;
  end

  // Reference model.
  longint model = 0;
  logic signed [31:0] exp_q [$];
  int                 issue_q [$];
  logic [15:0]        b_stage;
  logic               v_stage = 1'b0;

  always @(posedge clk) begin
    v_stage <= in_valid;
    if (in_valid) b_stage <= b;
  end

  task automatic issue(logic signed [15:0] va, logic signed [15:0] vb, logic clr);
    longint p;
    @(posedge clk);
    #1;
    in_valid = 1'b1; a = va; b = vb; acc_clear = clr;
    p = longint'(va) * longint'(vb);
    if (clr) begin
      model = p;
      n_clear++;
    end else begin
      longint s;
      s = longint'($signed(32'(model))) + p;
      if (s > 64'sh7FFFFFFF || s < -64'sh80000000) n_wrap++;
      model = s;
    end
    exp_q.push_back(32'(model));
    issue_q.push_back(cyc);
    n_ops++;
  endtask

  task automatic idle();
    @(posedge clk);
    #1 in_valid = 1'b0;
    a = 16'($urandom);
    b = 16'($urandom);
    acc_clear = 1'($urandom);
  endtask

  // Checker, just after the falling edge (strobe high, outputs settled).
  always @(negedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      logic signed [31:0] e;
      int ic;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid");
      end else begin
        e  = exp_q.pop_front();
        ic = issue_q.pop_front();
        if (acc !== e) begin
          failures++;
          $display("FAIL acc=%h expected %h", acc, e);
        end
        if (cyc - ic != 2) begin
          failures++;
          $display("FAIL latency %0d cycles", cyc - ic);
        end
      end
    end
    if (v_stage) begin
      logic e4, e2;
      e4 = b_stage[15:7] == '0 || b_stage[15:7] == '1;
      e2 = b_stage[15:11] == '0 || b_stage[15:11] == '1;
      checks++;
      if (status[1] !== e4 || status[0] !== e2) begin
        failures++;
        $display("FAIL freeze status %b for b=%h", status, b_stage);
      end
      if (e4) n_hi4++; else if (e2) n_hi2++;
      if (status[2]) n_close++; else n_open++;
      if (status[3]) n_tree++;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Worked example: 0x2AC9 * 0x006A = 0x0011B73A.
    issue(16'sh2AC9, 16'sh006A, 1'b1);
    idle();
    idle();
    checks++;
    if (acc !== 32'sh0011B73A) begin
      failures++;
      $display("FAIL worked example acc=%h", acc);
    end
    // Wrap-around: 2^30 four times.
    issue(-16'sh8000, -16'sh8000, 1'b1);
    repeat (4) issue(-16'sh8000, -16'sh8000, 1'b0);
    // Mixed stream.
    for (int n = 0; n < 4000; n++) begin
      logic signed [15:0] va, vb;
      int kind;
      kind = $urandom % 4;
      case (kind)
        0: begin va = 16'($signed(16'($urandom)) >>> 8);  vb = 16'($signed(16'($urandom)) >>> 8);  end
        1: begin va = 16'($urandom);                      vb = 16'($signed(16'($urandom)) >>> 4);  end
        2: begin va = 16'($urandom);                      vb = 16'($urandom);                      end
        default: begin va = 16'($signed(16'($urandom)) >>> ($urandom % 16));
                       vb = 16'($signed(16'($urandom)) >>> ($urandom % 16)); end
      endcase
      issue(va, vb, ($urandom % 16) == 0);
      if ($urandom % 5 == 0) idle();
    end
    idle();
    repeat (3) @(posedge clk);
    #2;
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", exp_q.size());
    end
    $display("ops %0d: rows4-7 frozen %0d, rows6-7 only %0d, tree compressor closed %0d, adder closed %0d open %0d, clears %0d, wraps %0d",
             n_ops, n_hi4, n_hi2, n_tree, n_close, n_open, n_clear, n_wrap);
    if (n_hi4 == 0 || n_tree == 0 || n_hi2 == 0 || n_close == 0 || n_open == 0 || n_clear == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

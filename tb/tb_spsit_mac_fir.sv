// Filtering workload for spsit_mac at its default parameters.
//
// Runs two 16-tap FIR filters over a sampled sine with noise:
//   h8[k]  = round(120  * sin(pi * (k + 0.5) / 16))  (fits 8 bits)
//   h12[k] = round(1900 * sin(pi * (k + 0.5) / 16))  (fits 12 bits)
//   x[n]   = round(3000 * sin(2 * pi * n / 37)) + noise in [-64, 63]
//   y[n]   = sum over k of h[k] * x[n - k]   (x[n] = 0 for n < 0)
// Each output is one clear-and-accumulate sequence of 16 operations, fed
// back-to-back with the coefficient on b (the Booth-recoded operand), as a
// DSP would schedule it. Every y[n] is checked against the direct sum. The
// 8-bit coefficients must freeze Booth rows 4..7, the 12-bit ones rows 6..7;
// both are counted and must occur.
module tb_spsit_mac_fir;
  import spsit_pkg::*;

  localparam int TAPS = 16;
  localparam int NOUT = 200;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid = 1'b0, acc_clear = 1'b0, assert_en = 1'b0;
  logic signed [15:0] a = '0, b = '0;
  logic               out_valid;
  logic signed [31:0] acc;
  logic [3:0]         status;

  int checks = 0, failures = 0;
  int n_hi4 = 0, n_hi2 = 0, n_close = 0;

  spsit_mac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc_clear(acc_clear),
    .a(a), .b(b), .assert_en(assert_en),
    .out_valid(out_valid), .acc(acc), .status(status)
  );

  always #5 clk = ~clk;

  always begin
    @(posedge clk);
    assert_en = 1'b0;
    #3 assert_en = 1'b1;
  end

  int                 h8  [TAPS];
  int                 h12 [TAPS];
  int                 x   [NOUT];
  logic               last_q [$];   // per operation: is it the last tap
  logic signed [31:0] exp_q  [$];   // expected y for each last tap
  logic               v_stage = 1'b0;

  always @(posedge clk) v_stage <= in_valid;

  always @(negedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      logic lst;
      lst = last_q.pop_front();
      if (lst) begin
        logic signed [31:0] e;
        e = exp_q.pop_front();
        checks++;
        if (acc !== e) begin
          failures++;
          $display("FAIL y=%0d expected %0d", acc, e);
        end
      end
    end
    if (v_stage) begin
      if (status[1]) n_hi4++;
      else if (status[0]) n_hi2++;
      if (status[2]) n_close++;
    end
  end

  task automatic run_filter(int h [TAPS]);
    for (int n = 0; n < NOUT; n++) begin
      longint y;
      y = 0;
      for (int k = 0; k < TAPS; k++) begin
        int xv;
        xv = (n - k >= 0) ? x[n - k] : 0;
        y += longint'(h[k]) * longint'(xv);
        @(posedge clk);
        #1;
        in_valid  = 1'b1;
        acc_clear = (k == 0);
        a         = 16'(xv);
        b         = 16'(h[k]);
        last_q.push_back(k == TAPS - 1);
      end
      exp_q.push_back(32'(y));
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n8_hi4, n12_hi2;
    for (int k = 0; k < TAPS; k++) begin
      h8[k]  = int'($rtoi(120.0  * $sin(3.14159265 * (k + 0.5) / TAPS) + 0.5));
      h12[k] = int'($rtoi(1900.0 * $sin(3.14159265 * (k + 0.5) / TAPS) + 0.5));
    end
    for (int n = 0; n < NOUT; n++)
      x[n] = int'($rtoi($floor(3000.0 * $sin(2.0 * 3.14159265 * n / 37.0) + 0.5))) + int'($urandom % 128) - 64;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_filter(h8);
    n8_hi4 = n_hi4;
    run_filter(h12);
    n12_hi2 = n_hi2;
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs never came out", exp_q.size());
    end
    $display("filter outputs %0d; rows4-7 frozen %0d (8-bit taps), rows6-7 only %0d (12-bit taps), adder closed %0d",
             2 * NOUT, n8_hi4, n12_hi2, n_close);
    if (n8_hi4 == 0 || n12_hi2 == 0) begin
      failures++;
      $display("FAIL a freeze case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

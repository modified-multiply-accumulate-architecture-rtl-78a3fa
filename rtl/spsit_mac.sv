// SPSIT multiply-accumulate unit (top level).
//
// Computes acc <= acc + a * b (or acc <= a * b when acc_clear is given with
// the operands) for 16-bit two's-complement a and b into a 32-bit
// two's-complement accumulator that wraps on overflow.
//
// Datapath, one operation per clock:
//   1. Input registers capture a, b, in_valid and acc_clear. They isolate the
//      multiplier from the operand source, so the detection logic sees stable
//      operands. (The operand registers belong to spsit_mbe.)
//   2. spsit_mbe recodes b into eight radix-4 Booth digits and forms eight
//      partial product rows from a. Its detection unit freezes the inputs of
//      MUX-4..7 (or MUX-6..7) when b is short and those rows are zero.
//   3. csa_tree reduces the eight rows to a sum and a carry row. In the AND
//      style its compressors are SPSIT-equipped (split at TREE_LSP_W), so
//      their upper parts freeze when both operands are small. In the
//      register style the tree uses plain compressors: falling-edge control
//      registers cannot be cascaded (a later stage would sample an earlier
//      stage before its own decision is released), and the final adder
//      already holds that slot.
//   4. One extra csa_3to2 stage folds the accumulator into the tree.
//   5. The final carry-propagate adder is an SPSIT adder (spsit_adder) split
//      16/16. When the upper halves of both rows are pure sign extension,
//      its upper adder is frozen and the sign-extension circuit gives the
//      upper half of the result.
//   6. The accumulator register loads the result.
//
// Timing: operands presented in cycle t are registered at the end of t, and
// the accumulator holding their contribution is visible from the end of t+1
// (out_valid high in cycle t+2). One new operand pair may enter every cycle.
//
// Asserting style: STYLE selects how the SPSIT control signals are released
// (see spsit_assert). With ASSERT_AND the system drives assert_en once the
// operands have settled in the cycle; with ASSERT_REG assert_en is ignored
// and the controls are registered: those of the Booth encoder with the
// operands on the rising edge, those of the final adder on the falling edge.
// Either way the result at each rising edge is exact. The status output
// shows the asserted freeze controls of the Booth encoder, the tree and the
// final adder.
//
// The structure follows the technique; the input register stage, the clear
// input, the 16/16 splits of the tree compressors and of the final adder, and
// the plain tree in the register style are this design's choices.
// Latches inside spsit_mbe, csa_tree (spsit_csa) and spsit_adder are
// intended.
module spsit_mac
  import spsit_pkg::*;
#(
  parameter int unsigned   W     = OP_WIDTH,
  parameter int unsigned   ACC_W = ACC_WIDTH,
  parameter int unsigned   CPA_LSP_W  = ACC_W / 2,
  parameter int unsigned   TREE_LSP_W = ACC_W / 2,
  parameter assert_style_e STYLE = ASSERT_AND
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    acc_clear,  // start a new sum with this product
  input  logic signed [W-1:0]     a,
  input  logic signed [W-1:0]     b,
  input  logic                    assert_en,  // asserting strobe (ASSERT_AND)
  output logic                    out_valid,  // acc includes the pair given two cycles ago
  output logic signed [ACC_W-1:0] acc,
  output logic [3:0]              status      // {tree_close, cpa_close, mbe_freeze_hi4, mbe_freeze_hi2}
);

  localparam int unsigned NPP = W / 2;

  // Control part of the input register stage (the operand registers are
  // inside spsit_mbe).
  logic valid_q, clear_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      clear_q <= 1'b0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) clear_q <= acc_clear;
    end
  end

  // Booth partial product generation.
  logic [ACC_W-1:0] pp [NPP];
  logic             freeze_hi4, freeze_hi2;

  spsit_mbe #(.W(W), .PP_W(ACC_W), .STYLE(STYLE)) u_mbe (
    .clk        (clk),
    .rst_n      (rst_n),
    .assert_en  (assert_en),
    .load       (in_valid),
    .a_in       (a),
    .b_in       (b),
    .pp         (pp),
    .freeze_hi4 (freeze_hi4),
    .freeze_hi2 (freeze_hi2)
  );

  // Partial product reduction tree.
  localparam int unsigned TREE_SPLIT = (STYLE == ASSERT_AND) ? TREE_LSP_W : 0;

  logic [ACC_W-1:0] t_sum, t_carry;
  logic [NPP-3:0]   tree_close;

  csa_tree #(.W(ACC_W), .N_ROWS(NPP), .SPSIT_LSP_W(TREE_SPLIT), .STYLE(STYLE)) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .assert_en (assert_en),
    .rows      (pp),
    .sum       (t_sum),
    .carry     (t_carry),
    .close     (tree_close)
  );

  // Accumulator folded in with one extra CSA stage.
  logic [ACC_W-1:0] acc_fb, m_sum, m_carry;
  assign acc_fb = clear_q ? '0 : acc;

  csa_3to2 #(.W(ACC_W)) u_acc_csa (
    .x     (t_sum),
    .y     (t_carry),
    .z     (acc_fb),
    .sum   (m_sum),
    .carry (m_carry)
  );

  // Final SPSIT carry-propagate adder.
  logic [ACC_W-1:0] result;
  logic             cpa_cout;
  spsit_ctrl_t      cpa_ctrl;

  spsit_adder #(.W(ACC_W), .LSP_W(CPA_LSP_W), .STYLE(STYLE)) u_cpa (
    .clk       (clk),
    .rst_n     (rst_n),
    .assert_en (assert_en),
    .a         (m_sum),
    .b         (m_carry),
    .sub       (1'b0),
    .cin       (1'b0),
    .sum       (result),
    .cout      (cpa_cout),
    .ctrl      (cpa_ctrl)
  );

  // Accumulator register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= valid_q;
      if (valid_q) acc <= result;
    end
  end

  assign status = {|tree_close, cpa_ctrl.close, freeze_hi4, freeze_hi2};

endmodule

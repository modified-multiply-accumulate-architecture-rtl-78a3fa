// SPSIT-equipped modified Booth encoder and partial product generator.
//
// Multiplies a W-bit two's-complement multiplicand A by a W-bit multiplier B
// in radix 4. The operands are first captured by input registers (loaded on
// the rising edge when load is high), which isolate the multiplier from the
// operand source. B is recoded into W/2 Booth digits (booth_encoder), the
// candidates +A, +2A, -A, -2A are formed once, and each row MUX (booth_pp_mux,
// MUX-0..MUX-7 for W = 16) picks the candidate named by its digit. Row i is
// returned sign-extended to PP_W bits and shifted left by 2i, so the product
// of the registered operands is simply the sum of all rows; a CSA tree adds
// them.
//
// Switching power suppression: a detection unit (spsit_mbe_detect) watches B.
// When B fits in W/2 bits the upper half of the rows (PP4..PP7) are zero; when
// it fits in 3W/4 bits the top quarter (PP6..PP7) are. Once asserted
// (spsit_assert), these flags make latches in front of MUX-4..MUX-7, or only
// MUX-6..MUX-7, hold their candidate inputs, so those MUXes do not see A
// change. Their digits are zero, so they still output zero. The latches are
// intended (they are the freezing latches of the technique).
//   ASSERT_REG: the detection looks at b_in and its flags are registered on
//     the same rising edge as the operands, so they are glitch-free and exact
//     from the start of the cycle.
//   ASSERT_AND: the detection looks at the registered B and is ANDed with the
//     asserting strobe assert_en.
//
// Interface: a_in, b_in and load feed the input registers; pp follows the
// registered operands combinationally. freeze_hi4 and freeze_hi2 report the
// asserted freeze signals. The grouping into an upper half and an upper
// quarter of the rows follows the technique; computing the candidates once
// and sharing them, and where the register-style flags are taken, are this
// design's choices.
module spsit_mbe
  import spsit_pkg::*;
#(
  parameter int unsigned   W     = OP_WIDTH,       // operand width (multiple of 8)
  parameter int unsigned   PP_W  = 2 * OP_WIDTH,   // width of each partial product row
  parameter assert_style_e STYLE = ASSERT_AND
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         assert_en,
  input  logic         load,              // capture a_in and b_in
  input  logic [W-1:0] a_in,              // multiplicand
  input  logic [W-1:0] b_in,              // multiplier (Booth encoded)
  output logic [PP_W-1:0] pp [W/2],       // shifted, sign-extended rows
  output logic         freeze_hi4,        // MUX-(W/4)..MUX-(W/2-1) inputs held
  output logic         freeze_hi2         // MUX-(3W/8)..MUX-(W/2-1) inputs held
);

  localparam int unsigned NPP = W / 2;

  // Input (isolation) registers.
  logic [W-1:0] a, b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0;
      b <= '0;
    end else if (load) begin
      a <= a_in;
      b <= b_in;
    end
  end

  // Candidate generation.
  typedef struct packed {
    logic signed [W+1:0] p1;
    logic signed [W+1:0] p2;
    logic signed [W+1:0] m1;
    logic signed [W+1:0] m2;
  } cand_t;

  cand_t cand;

  always_comb begin
    cand.p1 = {{2{a[W-1]}}, a};
    cand.p2 = {a[W-1], a, 1'b0};
    cand.m1 = -cand.p1;
    cand.m2 = -cand.p2;
  end

  // Detection unit and asserting logic.
  logic zero_hi4, zero_hi2;

  spsit_mbe_detect #(.W(W)) u_detect (
    .b        (STYLE == ASSERT_REG ? b_in : b),
    .zero_hi4 (zero_hi4),
    .zero_hi2 (zero_hi2)
  );

  spsit_assert #(.N(2), .STYLE(STYLE), .RISE(1'b1)) u_assert (
    .clk       (clk),
    .rst_n     (rst_n),
    .assert_en (assert_en),
    .load      (load),
    .raw       ({zero_hi4, zero_hi2}),
    .asserted  ({freeze_hi4, freeze_hi2})
  );

  // Freezing latches for the candidate inputs of the upper-half rows.
  cand_t cand_hi4, cand_hi2;

  always_latch begin
    if (!freeze_hi4) cand_hi4 = cand;
  end

  always_latch begin
    if (!freeze_hi2) cand_hi2 = cand;
  end

  // Booth encoders and row MUXes.
  logic [W:0] b_ext;
  assign b_ext = {b, 1'b0};  // b_ext[k+1] = b[k], b_ext[0] = b[-1] = 0

  for (genvar i = 0; i < NPP; i++) begin : g_row
    booth_digit_t digit;
    cand_t        c;
    logic [W+1:0] row;

    booth_encoder u_enc (
      .triplet (b_ext[2*i+2 -: 3]),
      .digit   (digit)
    );

    if (i >= 3 * NPP / 4) begin : g_c2
      assign c = cand_hi2;
    end else if (i >= NPP / 2) begin : g_c4
      assign c = cand_hi4;
    end else begin : g_c0
      assign c = cand;
    end

    booth_pp_mux #(.W(W)) u_mux (
      .cand_p1 (c.p1),
      .cand_p2 (c.p2),
      .cand_m1 (c.m1),
      .cand_m2 (c.m2),
      .digit   (digit),
      .pp      (row)
    );

    assign pp[i] = PP_W'({{(PP_W-W-2){row[W+1]}}, row} << (2 * i));
  end

endmodule

// SPSIT low-power adder/subtractor.
//
// Computes sum = a + b + cin (sub = 0) or sum = a - b (sub = 1, cin ignored)
// in W-bit two's complement, with carry-out. The adder is split into an LSP
// of LSP_W bits and an MSP of the remaining bits. The LSP adder always works.
// The MSP adder sits behind latch A and latch B (and a latch on its carry-in):
// when the detection logic finds both MSP operands to be pure sign extension,
// the asserted 'close' signal makes these latches opaque, so the MSP adder
// does not see the transition and burns no switching power. The MSP result is
// then produced by the sign-extension circuit, which only needs the two signs
// and the LSP carry-out:
//   signs (0,0): 0 + c     signs (0,1)/(1,0): -1 + c     signs (1,1): -2 + c
// and the carry glue logic gives carry-out = sa&sb | (sa^sb)&c.
// The results are therefore identical to a plain adder's whenever the control
// signals match the present operands, which the asserting logic guarantees by
// the end of each cycle.
//
// Interface: a, b, sub, cin are combinational inputs; sum and cout follow
// combinationally. clk, rst_n and assert_en only feed the asserting logic
// (see spsit_assert for the REG and AND styles; the register style samples on
// the falling edge here, since the operands come from logic, not from a
// register of this block). ctrl reports the asserted control signals.
//
// The level-sensitive latches are intended: they are latch A / latch B of the
// design, transparent while 'close' is low. Which operands the detection
// watches, and the latch on the MSP carry-in, follow the technique; the
// default 8/8 split of a 16-bit adder is the split used in its examples.
module spsit_adder
  import spsit_pkg::*;
#(
  parameter int unsigned   W     = 16,
  parameter int unsigned   LSP_W = 8,
  parameter assert_style_e STYLE = ASSERT_AND
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         assert_en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output spsit_ctrl_t  ctrl
);

  localparam int unsigned MSP_W = W - LSP_W;

  logic [W-1:0]     b_eff;
  logic             c0;
  logic [LSP_W-1:0] sum_lsp;
  logic             c_lsp;
  spsit_ctrl_t      ctrl_raw;

  // LSP: always computed.
  always_comb begin
    b_eff            = sub ? ~b : b;
    c0               = sub ? 1'b1 : cin;
    {c_lsp, sum_lsp} = {1'b0, a[LSP_W-1:0]} + {1'b0, b_eff[LSP_W-1:0]} + (LSP_W+1)'(c0);
  end

  // Detection logic and asserting logic.
  spsit_detect #(.MSP_W(MSP_W)) u_detect (
    .a_msp (a[W-1:LSP_W]),
    .b_msp (b_eff[W-1:LSP_W]),
    .ctrl  (ctrl_raw)
  );

  spsit_assert #(.N($bits(spsit_ctrl_t)), .STYLE(STYLE)) u_assert (
    .clk       (clk),
    .rst_n     (rst_n),
    .assert_en (assert_en),
    .load      (1'b1),
    .raw       (ctrl_raw),
    .asserted  (ctrl)
  );

  // Latch A, latch B and the carry-in latch of the MSP adder.
  logic [MSP_W-1:0] a_lat, b_lat;
  logic             c_lat;

  always_latch begin
    if (!ctrl.close) begin
      a_lat = a[W-1:LSP_W];
      b_lat = b_eff[W-1:LSP_W];
      c_lat = c_lsp;
    end
  end

  // MSP adder.
  logic [MSP_W-1:0] sum_msp_add;
  logic             c_msp_add;

  always_comb begin
    {c_msp_add, sum_msp_add} = {1'b0, a_lat} + {1'b0, b_lat} + (MSP_W+1)'(c_lat);
  end

  // Sign-extension circuit and carry glue logic.
  logic [MSP_W-1:0] sum_msp_ext;
  logic             c_msp_ext;

  always_comb begin
    unique case ({ctrl.sign_a, ctrl.sign_b})
      2'b00:   sum_msp_ext = '0;
      2'b11:   sum_msp_ext = {{(MSP_W-1){1'b1}}, 1'b0};
      default: sum_msp_ext = '1;
    endcase
    sum_msp_ext = sum_msp_ext + MSP_W'(c_lsp);
    c_msp_ext   = (ctrl.sign_a && ctrl.sign_b) || ((ctrl.sign_a ^ ctrl.sign_b) && c_lsp);
  end

  assign sum  = {ctrl.carr_ctrl ? sum_msp_ext : sum_msp_add, sum_lsp};
  assign cout = ctrl.carr_ctrl ? c_msp_ext : c_msp_add;

endmodule

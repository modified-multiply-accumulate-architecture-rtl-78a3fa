// Detection logic circuit of an SPSIT adder/subtractor.
//
// The adder is split into a least significant part (LSP) and a most
// significant part (MSP). When the MSP of each operand is only a sign
// extension (all zeros or all ones), the MSP sum is fully determined by the
// two signs and the carry out of the LSP, so the MSP adder need not switch.
// This circuit recognises that case and produces the three control outputs
// (as one struct): close, which freezes latches A and B in front of the MSP
// adder; carr_ctrl, which makes the glue logic supply the carry-out and the
// sign-extension circuit supply the MSP result; and the sign-extension
// information, the sign of each operand's MSP. The outputs are raw and must
// pass through the asserting logic (spsit_assert). Purely combinational.
module spsit_detect
  import spsit_pkg::*;
#(
  parameter int unsigned MSP_W = 8
)(
  input  logic [MSP_W-1:0] a_msp,
  input  logic [MSP_W-1:0] b_msp,
  output spsit_ctrl_t      ctrl
);

  logic a_ext, b_ext;

  always_comb begin
    a_ext          = (a_msp == '0) || (a_msp == '1);
    b_ext          = (b_msp == '0) || (b_msp == '1);
    ctrl.close     = a_ext && b_ext;
    ctrl.carr_ctrl = a_ext && b_ext;
    ctrl.sign_a    = a_msp[MSP_W-1];
    ctrl.sign_b    = b_msp[MSP_W-1];
  end

endmodule

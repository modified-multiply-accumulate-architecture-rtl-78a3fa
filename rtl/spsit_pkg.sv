// Shared types and constants of the SPSIT multiply-accumulate unit.
//
// The unit multiplies two 16-bit two's-complement operands with a radix-4
// (bit-pair recoded) modified Booth multiplier, so each 16-bit multiplier
// operand gives eight Booth digits, one per partial product row (PP0..PP7).
// A Booth digit is carried as a small struct of one-hot magnitude bits plus a
// sign, which is what a partial product MUX needs to select its candidate.
// The asserting style selects how the detection outputs of the switching power
// suppression logic are released to the latches: through registers clocked on
// a delayed edge, or through AND gates with an asserting strobe.
package spsit_pkg;

  // Operand width of the multiplier and width of the accumulator.
  localparam int unsigned OP_WIDTH  = 16;
  localparam int unsigned ACC_WIDTH = 32;

  // One radix-4 Booth digit: value = (neg ? -1 : +1) * (one ? 1 : two ? 2 : 0).
  // Zero is encoded with one = two = 0 and neg = 0.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  // How the detection logic outputs are asserted to the latches.
  typedef enum logic {
    ASSERT_REG = 1'b0,  // registers sampling on the delayed (falling) clock edge
    ASSERT_AND = 1'b1   // AND gates with an externally timed asserting strobe
  } assert_style_e;

  // Control outputs of one SPSIT detection logic circuit.
  typedef struct packed {
    logic close;     // freeze latches A/B of the MSP adder
    logic carr_ctrl; // take carry-out from the glue logic, not the MSP adder
    logic sign_a;    // MSP of operand A is all ones (else all zeros)
    logic sign_b;    // MSP of operand B is all ones (else all zeros)
  } spsit_ctrl_t;

  // Value of a Booth digit as a small signed integer (for checking and reuse).
  function automatic int booth_value(booth_digit_t d);
    int v;
    v = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -v : v;
  endfunction

endpackage

// Detection unit of the SPSIT-equipped modified Booth encoder.
//
// Looks at the Booth-encoded operand B and tells, before the partial products
// are formed, which upper rows will be zero. Booth digit i is formed from
// b[2i+1], b[2i], b[2i-1], and it is zero when the three bits are equal, so
//   PP4..PP7 are all zero  <=>  b[15:7]  are all equal (B fits in 8 bits),
//   PP6..PP7 are all zero  <=>  b[15:11] are all equal (B fits in 12 bits).
// These two raw (unasserted) flags drive the latches in front of MUX-4..7 and
// MUX-6..7 through the asserting logic. Purely combinational. The widths are
// written for the default 16-bit operand with eight Booth rows.
module spsit_mbe_detect
  import spsit_pkg::*;
#(
  parameter int unsigned W = OP_WIDTH  // Booth-encoded operand width (even)
)(
  input  logic [W-1:0] b,
  output logic         zero_hi4, // the upper four rows (PP4..PP7) are zero
  output logic         zero_hi2  // the upper two rows (PP6..PP7) are zero
);

  localparam int unsigned LO4 = W/2 - 1;     // lowest bit used by row W/4
  localparam int unsigned LO2 = 3*W/4 - 1;   // lowest bit used by row 3W/8

  always_comb begin
    zero_hi4 = (b[W-1:LO4] == '0) || (b[W-1:LO4] == '1);
    zero_hi2 = (b[W-1:LO2] == '0) || (b[W-1:LO2] == '1);
  end

endmodule

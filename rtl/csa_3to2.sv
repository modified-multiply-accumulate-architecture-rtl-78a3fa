// Carry-save adder row (3:2 compressor).
//
// A row of W full adders reduces three W-bit operands x, y, z to a sum row
// and a carry row with x + y + z = sum + carry (mod 2^W). The carry row is
// already shifted one place left. This is the building block of the partial
// product reduction tree and of the extra stage that folds the accumulator
// into the tree. Purely combinational.
module csa_3to2 #(
  parameter int unsigned W = 32
)(
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-2:0] maj;  // the carry out of the top bit falls off (mod 2^W)

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    carry = {maj, 1'b0};
  end

endmodule

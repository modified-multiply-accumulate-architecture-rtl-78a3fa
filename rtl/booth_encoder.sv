// Radix-4 modified Booth (bit-pair) encoder for one digit.
//
// Takes the multiplier bit triplet {b(i+1), b(i), b(i-1)} and recodes it into
// one digit in {-2, -1, 0, +1, +2} following the bit-pair recoding table:
//   000 -> 0, 001 -> +1, 010 -> +1, 011 -> +2,
//   100 -> -2, 101 -> -1, 110 -> -1, 111 -> 0.
// The digit is given as sign plus one-hot magnitude (one / two) so that a
// partial product MUX can use it directly. A zero digit always has neg = 0,
// so a zero row never injects a negation correction. Purely combinational.
module booth_encoder
  import spsit_pkg::*;
(
  input  logic [2:0]   triplet, // {b[2i+1], b[2i], b[2i-1]}
  output booth_digit_t digit
);

  always_comb begin
    digit.one = triplet[1] ^ triplet[0];
    digit.two = (triplet == 3'b011) || (triplet == 3'b100);
    digit.neg = triplet[2] && !(triplet[1] && triplet[0]);
  end

endmodule

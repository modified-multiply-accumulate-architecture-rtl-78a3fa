// Partial product MUX of the modified Booth multiplier (one of MUX-0..MUX-7).
//
// The partial product generator computes the candidates +A, +2A, -A and -2A
// once; each row MUX then picks the candidate named by its Booth digit, or
// zero. Candidates and result are (W+2)-bit two's-complement numbers, two
// bits wider than the multiplicand so that +/-2A fits even for the most
// negative A (-2 * -2^(W-1) = +2^W). Purely combinational.
module booth_pp_mux
  import spsit_pkg::*;
#(
  parameter int unsigned W = OP_WIDTH  // multiplicand width
)(
  input  logic signed [W+1:0] cand_p1, // +A
  input  logic signed [W+1:0] cand_p2, // +2A
  input  logic signed [W+1:0] cand_m1, // -A
  input  logic signed [W+1:0] cand_m2, // -2A
  input  booth_digit_t      digit,
  output logic signed [W+1:0] pp
);

  always_comb begin
    unique case ({digit.neg, digit.two, digit.one})
      3'b001:  pp = cand_p1;
      3'b010:  pp = cand_p2;
      3'b101:  pp = cand_m1;
      3'b110:  pp = cand_m2;
      default: pp = '0;
    endcase
  end

endmodule

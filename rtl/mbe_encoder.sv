// mbe_encoder: radix-4 modified Booth encoder for one group of multiplier
// bits {b[2j+1], b[2j], b[2j-1]}.
//
// Digit table: 000 -> 0, 001/010 -> +A, 011 -> +2A, 100 -> -2A,
// 101/110 -> -A, 111 -> 0. The outputs select the multiple (one/two) and
// whether it is inverted (neg). The standard encoder treats 111 as a plain
// zero (neg = 0). With MODIFIED = 1 the encoder adds one three-input OR over
// the inverted group bits: for 111 it asserts force1 and neg, so the decoder
// produces an all-ones row and the correction bit becomes 1, i.e. 111 is
// encoded as "-0". The effect is that the row's negation flag equals b[2j+1]
// alone, which the modified partial-product generator relies on.
// Purely combinational.
// The digit table and the extra three-input OR follow the published method;
// the exact gate structure of the encoder is this design's choice.
module mbe_encoder
  import rbm_pkg::*;
#(
  parameter bit MODIFIED = 1'b0
) (
  input  logic [2:0] bits,   // {b[2j+1], b[2j], b[2j-1]}
  output mbe_code_t  code
);

  logic no_zero_in;  // three-input OR of the inverted group bits
  logic ones;

  always_comb begin
    no_zero_in  = ~bits[2] | ~bits[1] | ~bits[0];
    ones        = MODIFIED ? ~no_zero_in : 1'b0;
    code.one    = bits[1] ^ bits[0];
    code.two    = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
    code.neg    = (bits[2] & ~(bits[1] & bits[0])) | ones;
    code.force1 = ones;
  end

endmodule

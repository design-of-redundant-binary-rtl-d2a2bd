// mbe_decoder: radix-4 Booth partial-product row decoder.
//
// Produces one normal-binary partial-product row of N+1 bits in one's
// complement form: pp[i] = ((one & a[i]) | (two & a[i-1])) ^ neg, with
// a[-1] = 0 and a[N] = a[N-1] (sign extension of the multiplicand). The
// two's-complement value of pp plus the encoder's neg bit equals digit * A.
// When the encoder's force1 is set (modified encoder, digit pattern 111) the
// whole row is driven to ones, which with neg = 1 again has value 0.
// Purely combinational.
// The decoder function follows the standard Booth scheme; the gate form and
// the N+1-bit row width are this design's choices.
module mbe_decoder
  import rbm_pkg::*;
#(
  parameter int N = 32   // multiplicand width
) (
  input  logic [N-1:0] a,    // multiplicand, two's complement
  input  mbe_code_t    code,
  output logic [N:0]   pp    // one's-complement row; pp[N] is its sign
);

  logic [N+1:0] a_ext;  // {a[N-1], a, 1'b0}: a_ext[i+1] = a[i]

  always_comb begin
    a_ext = {a[N-1], a, 1'b0};
    for (int i = 0; i <= N; i++) begin
      pp[i] = (((code.one & a_ext[i+1]) | (code.two & a_ext[i])) ^ code.neg)
              | code.force1;
    end
  end

endmodule

// rbbe2_row: radix-4 RB Booth encoder block (RBBE-2) - generates one
// redundant-binary partial-product row from two adjacent Booth groups.
//
// Booth group X ({b[4r+1], b[4r], b[4r-1]}) gives the positive part, group Y
// ({b[4r+3], b[4r+2], b[4r+1]}) the negative part, two bits higher. The row
// is returned unshifted (bit 0 = weight of X's LSB):
//   plus  = {~sX, sX, X[N-1:0]}                    (N+2 bits)
//   minus = {sY, ~Y[N-1:0], 1, 1}                  (N+3 bits)
// where X, Y are the one's-complement decoder rows and sX, sY their sign
// bits. The two ones are the inverted zeros below Y. As an RB number,
// plus - minus = X + 4Y + 1 - 2^(N+1) with X, Y read as signed rows; adding
// the row's correction word (negX - 1) + 4 negY and the sign-extension
// constant 2^(N+1) gives (digitX + 4 digitY) * A. The caller (rbmppg2)
// supplies both elsewhere. neg_x/neg_y are the
// correction bits. MODIFIED_X selects the modified encoder for X (used by
// the last row only). Purely combinational.
// Pairing two Booth rows with the second inverted follows the published
// method; the exact bit layout and sign handling are this design's choice.
module rbbe2_row
  import rbm_pkg::*;
#(
  parameter int N          = 32,   // operand width
  parameter bit MODIFIED_X = 1'b0  // X encoder codes 111 as -0
) (
  input  logic [N-1:0] a,       // multiplicand
  input  logic [2:0]   bits_x,  // Booth group of the positive part
  input  logic [2:0]   bits_y,  // Booth group of the negative part
  output logic [N+1:0] plus,
  output logic [N+2:0] minus,
  output logic         neg_x,
  output logic         neg_y
);

  mbe_code_t  code_x, code_y;
  logic [N:0] pp_x, pp_y;

  mbe_encoder #(.MODIFIED(MODIFIED_X)) u_enc_x (.bits(bits_x), .code(code_x));
  mbe_encoder #(.MODIFIED(1'b0))       u_enc_y (.bits(bits_y), .code(code_y));
  mbe_decoder #(.N(N)) u_dec_x (.a(a), .code(code_x), .pp(pp_x));
  mbe_decoder #(.N(N)) u_dec_y (.a(a), .code(code_y), .pp(pp_y));

  assign plus  = {~pp_x[N], pp_x};
  assign minus = {pp_y[N], ~pp_y[N-1:0], 2'b11};
  assign neg_x = code_x.neg;
  assign neg_y = code_y.neg;

endmodule

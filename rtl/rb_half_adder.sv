// rb_half_adder (RBHA): one digit of a redundant-binary adder whose second
// operand digit is known to be zero (encoded 0,0), as happens in the low
// bits of a shifted partial-product row.
//
// It is the RB full adder with bp = bm = 0 simplified: FA1 becomes a half
// adder on {ap, ~am}, FA2 adds that sum and the incoming carry to a constant
// one, so its sum is an XNOR and its carry an OR. Carries c and d and the
// result encoding zp = d_in, zm = ~sum are the same as in rb_full_adder, so
// the two cells can be mixed in one adder.
// Purely combinational.
// The method only names RB half adders; this cell and where it is used are
// this design's choice.
module rb_half_adder (
  input  logic ap, am,   // digit of operand a
  input  logic c_in,
  input  logic d_in,
  output logic c_out,
  output logic d_out,
  output logic zp, zm
);

  logic s1;

  always_comb begin
    s1    = ap ^ ~am;
    c_out = ap & ~am;
    d_out = s1 | c_in;
    zp    = d_in;
    zm    = s1 ^ c_in;   // ~(~(s1 ^ c_in))
  end

endmodule

// rb_full_adder (RBFA): one digit of a carry-free redundant-binary adder.
//
// Adds RB digit a = ap - am and RB digit b = bp - bm. It is built from two
// full adders: FA1 adds {ap, ~am, bp} and passes its carry c to the next
// digit; FA2 adds FA1's sum, ~bm and the carry c from the previous digit,
// passing its carry d to the next digit. The result digit is
// z = zp - zm with zp = d from the previous digit and zm = ~(FA2 sum).
// Each digit therefore depends only on the two digits below it, so the
// adder's delay does not grow with its width. At the least significant
// digit the chain starts with c_in = 0, d_in = 1 (see rb_accum_stage).
// Purely combinational.
// The method only names RB full adders; this two-full-adder cell is this
// design's choice.
module rb_full_adder (
  input  logic ap, am,   // digit of operand a
  input  logic bp, bm,   // digit of operand b
  input  logic c_in,     // FA1 carry from the previous digit
  input  logic d_in,     // FA2 carry from the previous digit
  output logic c_out,
  output logic d_out,
  output logic zp, zm    // result digit
);

  logic x1, x2, s1, t;

  always_comb begin
    x1    = ~am;
    x2    = ~bm;
    s1    = ap ^ x1 ^ bp;
    c_out = (ap & x1) | (ap & bp) | (x1 & bp);
    t     = s1 ^ x2 ^ c_in;
    d_out = (s1 & x2) | (s1 & c_in) | (x2 & c_in);
    zp    = d_in;
    zm    = ~t;
  end

endmodule

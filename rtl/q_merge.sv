// q_merge: folds the last row's error-correcting digit E2 into four
// partial-product bits (the "modified partial products" Q).
//
// The last RB row's correction word has been reduced to one digit
// E2 in {-1, 0, +1} at the weight of the last negative Booth row's LSB. It is
// decoded from the top three multiplier bits {b[N-1], b[N-2], b[N-3]}:
//   E2 = -1 for 000, 010;  E2 = +1 for 101;  E2 = 0 otherwise.
// The four bits {p19, p18, p21, p20} form one binary number at that weight:
// the two sign-extension bits of the first row (p19 = ~p18, so the field is
// always 0100..1011) and the two LSBs of the last negative Booth row. Q is
// that field plus E2; it can neither overflow nor underflow. The sums are
// written as separate keep / decrement / increment terms, one AND-OR per
// output bit.
// Purely combinational.
// The E2 table and the keep/increment/decrement form follow the published
// method; it is written as AND-OR logic, not as a transmission-gate circuit,
// and from decoder outputs rather than directly from the operand bits.
module q_merge (
  input  logic [2:0] b_top,  // {b[N-1], b[N-2], b[N-3]}
  input  logic       p19,    // first row, sign-extension bit (= ~p18)
  input  logic       p18,    // first row, sign bit
  input  logic       p21,    // last negative Booth row, bit 1
  input  logic       p20,    // last negative Booth row, bit 0
  output logic       q19,
  output logic       q18,
  output logic       q21,
  output logic       q20
);

  logic keep, dec, inc;

  always_comb begin
    keep = (b_top[2] ^ b_top[0]) | (b_top[2] & b_top[1] & b_top[0]);
    dec  = ~b_top[2] & ~b_top[0];
    inc  = b_top[2] & ~b_top[1] & b_top[0];

    q19 = (keep & p19)
        | (dec  & (~(p18 | p21 | p20) ^ p19))
        | (inc  & ((p18 & p21 & p20) ^ p19));
    q18 = (keep & p18)
        | (dec  & (~(p21 | p20) ^ p18))
        | (inc  & ((p21 & p20) ^ p18));
    q21 = (keep & p21)
        | (dec  & (~p20 ^ p21))
        | (inc  & (p20 ^ p21));
    q20 = (keep & p20)
        | ((dec | inc) & ~p20);
  end

endmodule

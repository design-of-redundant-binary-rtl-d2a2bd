// q_direct: the modified partial products Q19, Q18, Q21, Q20 computed
// directly from operand bits, in parallel with the Booth decoders.
//
// Same function as q_merge (the 4-bit field {p19, p18, p21, p20} plus the
// correction digit E2), but nothing waits for a decoder output:
//   S  = first row's sign bit  = ~b1 b0 a[N-1] | b1 ~a[N-1]      (p18; p19 = ~S)
//   cy = carry into S          = b7 ~b6 b5 ~a1 ~a0                (E2 = +1 and
//                                                                  {p21,p20} = 11)
//   bw = borrow from S         = ~b7 ~b5 (~b6 | ~a1 ~a0)          (E2 = -1 and
//                                                                  {p21,p20} = 00)
//   Q19 = cy | ~S ~bw          Q18 = S ^ (cy | bw)
//   Q21, Q20: the two low bits of the field after +-1, written per top
//   pattern (b7 b6 b5 = b[N-1], b[N-2], b[N-3]; a1, a0 = a[1], a[0]).
// The low-bit values per pattern are 000: 11, 001: a1 a0, 010: {a1,a0}-1,
// 011: a0 0, 100: ~a0 1, 101: {~a1,~a0}+1, 110: ~a1 ~a0, 111: 00.
// Purely combinational.
// Generating Q straight from the operands is part of the published method;
// these equations were derived for this design from the digit and E2 tables.
module q_direct (
  input  logic [2:0] b_top,  // {b[N-1], b[N-2], b[N-3]}
  input  logic [1:0] b_low,  // {b[1], b[0]}
  input  logic       a_msb,  // a[N-1]
  input  logic [1:0] a_low,  // {a[1], a[0]}
  output logic       q19,
  output logic       q18,
  output logic       q21,
  output logic       q20
);

  logic b7, b6, b5, b1, b0, a1, a0;
  logic s, cy, bw;

  always_comb begin
    {b7, b6, b5} = b_top;
    {b1, b0}     = b_low;
    {a1, a0}     = a_low;

    s  = (~b1 & b0 & a_msb) | (b1 & ~a_msb);
    cy = b7 & ~b6 & b5 & ~a1 & ~a0;
    bw = ~b7 & ~b5 & (~b6 | (~a1 & ~a0));

    q19 = cy | (~s & ~bw);
    q18 = s ^ (cy | bw);

    // Q20 depends on b6, b5 only: 00 -> 1, 01 -> a0, 10 -> ~a0, 11 -> 0.
    q20 = (~b6 & ~b5) | (~b6 & b5 & a0) | (b6 & ~b5 & ~a0);

    // Q21 per top pattern.
    q21 = (~b7 & ~b6 & ~b5)                  // 000: 1
        | (~b7 & ~b6 &  b5 & a1)             // 001: a1
        | (~b7 &  b6 & ~b5 & ~(a1 ^ a0))     // 010: a1 ^ ~a0
        | (~b7 &  b6 &  b5 & a0)             // 011: a0
        | ( b7 & ~b6 & ~b5 & ~a0)            // 100: ~a0
        | ( b7 & ~b6 &  b5 & (a1 ^ a0))      // 101: ~a1 ^ ~a0
        | ( b7 &  b6 & ~b5 & ~a1);           // 110: ~a1
  end

endmodule

// rb_accum_stage: one RB partial-product accumulation stage for a pair of
// rows: a W-digit carry-free redundant-binary adder z = a + b (mod 2^W).
//
// Digit i is an rb_full_adder, or an rb_half_adder for the lowest HALF_LSBS
// digits, where operand b is known to have all-zero bits (its plus and minus
// bits there are ignored). The carry chains start with c = 0 and d = 1 at
// digit 0; the carries out of digit W-1 are dropped, which keeps the result
// exact modulo 2^W. Delay is that of two full adders whatever W is.
// Purely combinational.
// One adder per pair of rows follows the method; the digit cells are this
// design's own.
module rb_accum_stage #(
  parameter int W         = 64,  // digits
  parameter int HALF_LSBS = 0    // low digits of b that are structurally zero
) (
  input  logic [W-1:0] a_p, a_m,
  input  logic [W-1:0] b_p, b_m,
  output logic [W-1:0] z_p, z_m
);

  logic [W:0] c, d;

  assign c[0] = 1'b0;
  assign d[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_digit
    if (i < HALF_LSBS) begin : g_ha
      rb_half_adder u_ha (
        .ap (a_p[i]), .am (a_m[i]),
        .c_in (c[i]), .d_in (d[i]),
        .c_out (c[i+1]), .d_out (d[i+1]),
        .zp (z_p[i]), .zm (z_m[i])
      );
    end else begin : g_fa
      rb_full_adder u_fa (
        .ap (a_p[i]), .am (a_m[i]),
        .bp (b_p[i]), .bm (b_m[i]),
        .c_in (c[i]), .d_in (d[i]),
        .c_out (c[i+1]), .d_out (d[i+1]),
        .zp (z_p[i]), .zm (z_m[i])
      );
    end
  end

  // The carries out of the top digit fall outside the 2^W range.
  logic unused_carry;
  assign unused_carry = c[W] ^ d[W];

  // Operand b's bits below HALF_LSBS are zero by construction and not read.
  if (HALF_LSBS > 0) begin : g_unused_b
    logic unused_b;
    assign unused_b = ^{b_p[HALF_LSBS-1:0], b_m[HALF_LSBS-1:0]};
  end

endmodule

// rbmppg2: redundant-binary modified partial-product generator (radix-4
// Booth based). Turns an N x N two's-complement multiplication into N/4
// redundant-binary (RB) partial-product rows whose sum, modulo 2^(2N), is
// A * B. A conventional RB Booth generator needs one extra row for the
// error-correcting word (ECW) of the last RB row; this one does not.
//
// Construction (row r = 0 .. N/4-1, weight 2^(4r)):
//  * Booth group 2r gives the row's positive part X (decoder bits as is),
//    Booth group 2r+1 the negative part Y, shifted left by two and inverted
//    into the minus vector. The two bits shifted in below Y also enter the
//    minus vector inverted (as ones).
//  * Sign handling: X carries {~s, s} on top (bits N+1, N); Y's sign bit goes
//    un-inverted into the minus vector at bit N+2.
//  * ECW of row r: F = negX - 1 at bit 0 and E = negY at bit 2 of the row.
//    It is moved into row r+1, whose lower bits are free: F as the minus bit
//    ~negX, E as the plus bit negY.
//  * The last row has no successor. Its positive Booth group uses the
//    modified encoder (111 coded as -0), so F depends on b[N-3] only; F is
//    absorbed by setting the two shifted-in minus bits of that row to
//    b[N-3], leaving a single digit E2 (see q_merge) that is added into the
//    first row's two top bits and the last row's two low bits.
//  * The constants left over from the sign-extension bits of all rows,
//    2^(N+1+4r), are pre-added: the r = 0 term turns the first row's top into
//    {Q19, ~Q19, Q18} at bits N+2..N, the others are constant ones in the
//    first row's plus vector at bits N+5, N+9, ..., 2N-3.
// Each row comes from one rbbe2_row block; this module places the rows,
// routes the correction words and applies the Q merge. With DIRECT_Q = 1
// (default) the four Q bits come from q_direct, straight from operand bits
// and in parallel with the decoders; with DIRECT_Q = 0 from q_merge, after
// the decoders.
// Interface: row_p[r] / row_m[r] are the plus / minus vectors of row r, each
// 2N bits wide (already shifted to their weight). Purely combinational.
// The row pairing, the moved correction words, the modified encoder, the
// b[N-3] bits and the Q merge follow the published method; the bit layout
// and the handling of the sign-extension constants are this design's own.
module rbmppg2
  import rbm_pkg::*;
#(
  parameter int N        = 32,   // operand width, a power of two >= 8
  parameter bit DIRECT_Q = 1'b1  // 1: Q from operand bits (q_direct),
                                 // 0: Q from decoder outputs (q_merge)
) (
  input  logic [N-1:0]                 a,      // multiplicand
  input  logic [N-1:0]                 b,      // multiplier
  output logic [N/4-1:0][2*N-1:0]      row_p,  // RB rows, plus vectors
  output logic [N/4-1:0][2*N-1:0]      row_m   // RB rows, minus vectors
);

  localparam int R = rbpp_rows(N);   // RB rows
  localparam int W = 2 * N;          // product width

  initial begin
    assert (N >= 8 && (N & (N - 1)) == 0)
      else $error("rbmppg2: N must be a power of two and at least 8");
  end

  logic [N:0] b_ext;  // {b, 1'b0}: b_ext[i+1] = b[i], b_ext[0] = b[-1]

  // One RBBE-2 block per RB row.
  logic [R-1:0][N+1:0] plus;
  logic [R-1:0][N+2:0] minus;
  logic [R-1:0]        neg_x, neg_y;

  assign b_ext = {b, 1'b0};

  for (genvar r = 0; r < R; r++) begin : g_row
    rbbe2_row #(.N(N), .MODIFIED_X(r == R - 1)) u_rbbe (
      .a      (a),
      .bits_x (b_ext[4*r+2 -: 3]),
      .bits_y (b_ext[4*r+4 -: 3]),
      .plus   (plus[r]),
      .minus  (minus[r]),
      .neg_x  (neg_x[r]),
      .neg_y  (neg_y[r])
    );
  end

  // Correction-free merge of the last row's ECW. p19/p18 are the first row's
  // sign-extension bits, p21/p20 the last negative Booth row's two LSBs
  // (held inverted in the minus vector).
  logic q19, q18, q21, q20;

  if (DIRECT_Q) begin : g_qd
    q_direct u_qd (
      .b_top (b[N-1:N-3]),
      .b_low (b[1:0]),
      .a_msb (a[N-1]),
      .a_low (a[1:0]),
      .q19   (q19),
      .q18   (q18),
      .q21   (q21),
      .q20   (q20)
    );
    // The replaced bits are not read on this path.
    logic unused_p;
    assign unused_p = ^{plus[0][N+1:N], minus[R-1][3:2]};
  end else begin : g_qm
    q_merge u_qm (
      .b_top (b[N-1:N-3]),
      .p19   (plus[0][N+1]),
      .p18   (plus[0][N]),
      .p21   (~minus[R-1][3]),
      .p20   (~minus[R-1][2]),
      .q19   (q19),
      .q18   (q18),
      .q21   (q21),
      .q20   (q20)
    );
  end

  always_comb begin
    row_p = '0;
    row_m = '0;
    for (int r = 0; r < R; r++) begin
      // Place the row at bit 4r.
      for (int k = 0; k < N + 2; k++) row_p[r][4*r+k] = plus[r][k];
      for (int k = 0; k < N + 3; k++) row_m[r][4*r+k] = minus[r][k];

      if (r == 0) begin
        // Q merge plus the pre-added sign-extension constants.
        row_p[0][N]   = q18;
        row_p[0][N+1] = ~q19;
        row_p[0][N+2] = q19;
        for (int m = 0; m < R - 1; m++) row_p[0][N+5+4*m] = 1'b1;
      end

      if (r == R - 1) begin
        row_m[r][4*r]   = b[N-3];   // F of the last row, folded in
        row_m[r][4*r+1] = b[N-3];
        row_m[r][4*r+2] = ~q20;
        row_m[r][4*r+3] = ~q21;
      end

      // ECW of row r-1 moved into row r.
      if (r > 0) begin
        row_m[r][4*r-4] = ~neg_x[r-1];  // F = negX - 1
        row_p[r][4*r-2] = neg_y[r-1];   // E = negY
      end
    end
  end

  // Every bit position used above lies below 2N.
  if (4 * (R - 1) + N + 2 >= W) begin : g_width_error
    $error("rbmppg2: row layout exceeds the product width");
  end

endmodule

// rb_multiplier: N x N two's-complement redundant-binary Booth multiplier
// built on the modified partial-product generator.
//
// Datapath (all combinational, P = A * B, 2N-bit signed result):
//   rbmppg2          N/2 radix-4 Booth rows -> N/4 RB partial-product rows,
//                    with no extra error-correcting row
//   rbpp_tree        log2(N/4) RB accumulation stages of carry-free RB adders
//                    (3 stages for the default N = 32)
//   rb_nb_converter  RB -> normal binary with a hybrid parallel-prefix /
//                    carry-select adder
// No clock: the product is valid one combinational delay after A and B.
// The three-part structure and the 32-bit default follow the published
// method; leaving it unregistered is this design's choice.
module rb_multiplier
  import rbm_pkg::*;
#(
  parameter int N   = 32,  // operand width, power of two >= 8
  parameter int BLK = 8    // carry-select block width of the converter
) (
  input  logic [N-1:0]   a,  // multiplicand, two's complement
  input  logic [N-1:0]   b,  // multiplier, two's complement
  output logic [2*N-1:0] p   // product, two's complement
);

  localparam int R = rbpp_rows(N);
  localparam int W = 2 * N;

  logic [R-1:0][W-1:0] row_p, row_m;
  logic [W-1:0]        sum_p, sum_m;

  rbmppg2 #(.N(N)) u_ppg (
    .a     (a),
    .b     (b),
    .row_p (row_p),
    .row_m (row_m)
  );

  rbpp_tree #(.ROWS(R), .W(W)) u_tree (
    .rows_p (row_p),
    .rows_m (row_m),
    .sum_p  (sum_p),
    .sum_m  (sum_m)
  );

  rb_nb_converter #(.W(W), .BLK(BLK)) u_conv (
    .x_p (sum_p),
    .x_m (sum_m),
    .p   (p)
  );

endmodule

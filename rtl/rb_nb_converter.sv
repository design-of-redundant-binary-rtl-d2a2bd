// rb_nb_converter: redundant-binary to normal-binary converter.
//
// Computes p = x_p - x_m (mod 2^W) as x_p + ~x_m + 1 with a hybrid
// parallel-prefix / carry-select adder. The word is cut into W/BLK blocks.
// Each block forms both of its possible sums, for carry-in 0 and 1, in
// parallel, and from them a block generate (carry out with carry-in 0) and
// block propagate (carry out with carry-in 1 but not 0). A Kogge-Stone
// prefix network over the block (generate, propagate) pairs, with the
// converter's carry-in 1 entering as a generate at block 0, gives each
// block's carry-in, which then selects one of its two precomputed sums.
// Interface: x_p/x_m in, p out. Purely combinational.
// A hybrid parallel-prefix / carry-select adder is what the method names;
// block size 8 and the Kogge-Stone prefix are this design's choices.
module rb_nb_converter #(
  parameter int W   = 64,  // word width
  parameter int BLK = 8    // carry-select block width, must divide W
) (
  input  logic [W-1:0] x_p,
  input  logic [W-1:0] x_m,
  output logic [W-1:0] p
);

  localparam int NB = W / BLK;

  initial begin
    assert (W % BLK == 0) else $error("rb_nb_converter: BLK must divide W");
  end

  logic [W-1:0]         y;
  logic [NB-1:0][BLK:0] sum0, sum1;   // block sums with carry-out on top
  logic [NB-1:0]        g, pr;        // block generate / propagate
  logic [NB:0]          cin;          // carry into each block

  assign y = ~x_m;

  // Block sums for both carry-ins.
  for (genvar k = 0; k < NB; k++) begin : g_blk
    always_comb begin
      sum0[k] = {1'b0, x_p[k*BLK +: BLK]} + {1'b0, y[k*BLK +: BLK]};
      sum1[k] = {1'b0, x_p[k*BLK +: BLK]} + {1'b0, y[k*BLK +: BLK]} + (BLK+1)'(1);
      g[k]    = sum0[k][BLK];
      pr[k]   = sum1[k][BLK] & ~sum0[k][BLK];
    end
  end

  // Kogge-Stone prefix over the blocks. Node (gg, pp)[k] covers blocks 0..k
  // together with the carry-in 1, which is folded into block 0's generate.
  localparam int LEVELS = (NB <= 1) ? 1 : $clog2(NB) + 1;
  logic [LEVELS-1:0][NB-1:0] gg, pp;

  assign gg[0] = {g[NB-1:1], g[0] | pr[0]};   // block 0 sees carry-in 1
  assign pp[0] = pr;

  for (genvar l = 1; l < LEVELS; l++) begin : g_lvl
    localparam int D = 1 << (l - 1);
    for (genvar k = 0; k < NB; k++) begin : g_node
      if (k >= D) begin : g_op
        assign gg[l][k] = gg[l-1][k] | (pp[l-1][k] & gg[l-1][k-D]);
        assign pp[l][k] = pp[l-1][k] & pp[l-1][k-D];
      end else begin : g_wire
        assign gg[l][k] = gg[l-1][k];
        assign pp[l][k] = pp[l-1][k];
      end
    end
  end

  assign cin = {gg[LEVELS-1], 1'b1};

  // Carry select.
  always_comb begin
    for (int k = 0; k < NB; k++) begin
      p[k*BLK +: BLK] = cin[k] ? sum1[k][BLK-1:0] : sum0[k][BLK-1:0];
    end
  end

  // Carry out of the top block falls outside the 2^W range; the last
  // propagate terms are only needed for wider words.
  logic unused_top;
  assign unused_top = cin[NB] ^ (^pp[LEVELS-1]);

endmodule

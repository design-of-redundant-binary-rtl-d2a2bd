// rbpp_tree: RB partial-product reduction tree.
//
// Reduces ROWS redundant-binary rows of W digits to one RB number, halving
// the row count in each RB accumulation stage (rb_accum_stage), so it has
// ceil(log2(ROWS)) stages: 3 for the 8 rows of a 32 x 32 multiplier. With an
// odd count the last row of a level passes to the next level unchanged. In
// the first stage the second row of each pair is zero below its lowest
// possible non-zero bit (rbm_pkg::row_lsb), so those digits use RB half
// adders; later stages use full adders throughout, because an RB sum's low
// digits are zero-valued but not zero-coded.
// Interface: rows_p/rows_m[r] are plus/minus vectors of row r, sum_p/sum_m
// the result. Purely combinational.
// The stage count follows the method; pairing order and odd-row pass-through
// are this design's choices.
module rbpp_tree
  import rbm_pkg::*;
#(
  parameter int ROWS = 8,    // RB rows (N/4)
  parameter int W    = 64    // digits per row (2N)
) (
  input  logic [ROWS-1:0][W-1:0] rows_p,
  input  logic [ROWS-1:0][W-1:0] rows_m,
  output logic [W-1:0]           sum_p,
  output logic [W-1:0]           sum_m
);

  localparam int STAGES = accum_stages(ROWS);

  // Rows alive at level l.
  function automatic int level_rows(input int l);
    int n;
    n = ROWS;
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  // lvl_p[l][r]: row r at the input of level l (level STAGES is the output).
  logic [STAGES:0][ROWS-1:0][W-1:0] lvl_p, lvl_m;

  assign lvl_p[0] = rows_p;
  assign lvl_m[0] = rows_m;

  for (genvar l = 0; l < STAGES; l++) begin : g_stage
    localparam int NIN  = level_rows(l);
    localparam int NOUT = level_rows(l + 1);
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      if (r < NIN / 2) begin : g_add
        rb_accum_stage #(
          .W         (W),
          .HALF_LSBS ((l == 0) ? row_lsb(2 * r + 1) : 0)
        ) u_acc (
          .a_p (lvl_p[l][2*r]),   .a_m (lvl_m[l][2*r]),
          .b_p (lvl_p[l][2*r+1]), .b_m (lvl_m[l][2*r+1]),
          .z_p (lvl_p[l+1][r]),   .z_m (lvl_m[l+1][r])
        );
      end else if (r == NIN / 2 && (NIN % 2) == 1) begin : g_pass
        assign lvl_p[l+1][r] = lvl_p[l][NIN-1];
        assign lvl_m[l+1][r] = lvl_m[l][NIN-1];
      end else if (r >= NOUT) begin : g_idle
        assign lvl_p[l+1][r] = '0;
        assign lvl_m[l+1][r] = '0;
      end
    end
  end

  assign sum_p = lvl_p[STAGES][0];
  assign sum_m = lvl_m[STAGES][0];

endmodule

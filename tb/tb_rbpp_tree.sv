// tb_rbpp_tree: checks the RB reduction tree. Random RB rows (row r zero
// below bit 4(r-1), as the partial-product generator guarantees) must sum to
// the same value modulo 2^W at the tree output. Instances: 8 rows of 64
// digits (the 32-bit multiplier, 3 stages), 2 rows of 16 digits (8-bit, 1
// stage) and 5 rows (odd count: a row passes a level unchanged).
module tb_rbpp_tree;
  logic [7:0][63:0] r8_p, r8_m;
  logic [63:0]      s8_p, s8_m;
  logic [1:0][15:0] r2_p, r2_m;
  logic [15:0]      s2_p, s2_m;
  logic [4:0][39:0] r5_p, r5_m;
  logic [39:0]      s5_p, s5_m;

  rbpp_tree dut8 (.rows_p(r8_p), .rows_m(r8_m), .sum_p(s8_p), .sum_m(s8_m));
  rbpp_tree #(.ROWS(2), .W(16)) dut2 (.rows_p(r2_p), .rows_m(r2_m), .sum_p(s2_p), .sum_m(s2_m));
  rbpp_tree #(.ROWS(5), .W(40)) dut5 (.rows_p(r5_p), .rows_m(r5_m), .sum_p(s5_p), .sum_m(s5_m));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] low_mask(input int r);
    int lsb;
    lsb = (r == 0) ? 0 : 4 * r - 4;
    return ~64'(0) << lsb;
  endfunction

  initial begin
    logic [63:0] e8;
    logic [15:0] e2;
    logic [39:0] e5;
    checks++;
    if (rbm_pkg::accum_stages(8) != 3 || rbm_pkg::accum_stages(2) != 1 ||
        rbm_pkg::accum_stages(16) != 4) failures++;
    for (int v = 0; v < 20000; v++) begin
      e8 = '0; e2 = '0; e5 = '0;
      for (int r = 0; r < 8; r++) begin
        r8_p[r] = {$urandom(), $urandom()} & low_mask(r);
        r8_m[r] = {$urandom(), $urandom()} & low_mask(r);
        e8 = e8 + r8_p[r] - r8_m[r];
      end
      for (int r = 0; r < 2; r++) begin
        r2_p[r] = 16'($urandom()) & 16'(low_mask(r));
        r2_m[r] = 16'($urandom()) & 16'(low_mask(r));
        e2 = e2 + r2_p[r] - r2_m[r];
      end
      for (int r = 0; r < 5; r++) begin
        r5_p[r] = 40'({$urandom(), $urandom()}) & 40'(low_mask(r));
        r5_m[r] = 40'({$urandom(), $urandom()}) & 40'(low_mask(r));
        e5 = e5 + r5_p[r] - r5_m[r];
      end
      #1;
      checks += 3;
      if (s8_p - s8_m !== e8) failures++;
      if (s2_p - s2_m !== e2) failures++;
      if (s5_p - s5_m !== e5) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rb_multiplier: end-to-end test of the 32 x 32 RB multiplier at its
// default parameters.
//
// Applies corner operands (0, +-1, extremes, alternating patterns) and then
// random operands whose top multiplier bits are steered so that every Booth
// digit pattern, every value of the last row's correction digit E2 and the
// forced all-ones pattern (111) of the modified Booth row occur. The product
// is compared with the simulator's own signed multiplication. The coverage
// of each mechanism is counted from the operand bits, independently of the
// design, and a mechanism that never occurred counts as a failure. The
// structure is checked too: 8 RB rows and 3 accumulation stages.
module tb_rb_multiplier;
  localparam int N = 32;
  localparam int NVEC = 200000;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  rb_multiplier dut (.a(a), .b(b), .p(p));

  int checks = 0, failures = 0;
  int cov_e2_neg = 0, cov_e2_zero = 0, cov_e2_pos = 0;
  int cov_mod_111 = 0, cov_ecw_moved = 0;
  int cov_digit [8];

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic signed [2*N-1:0] expect_p;
    logic [2:0] top;
    a = ta;
    b = tb_;
    #1;
    expect_p = $signed({{N{ta[N-1]}}, ta}) * $signed({{N{tb_[N-1]}}, tb_});
    checks++;
    if (p !== expect_p) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH a=%h b=%h p=%h expected=%h", ta, tb_, p, expect_p);
    end
    // Coverage from the multiplier bits alone.
    top = tb_[N-1:N-3];
    if (top == 3'b000 || top == 3'b010) cov_e2_neg++;
    else if (top == 3'b101) cov_e2_pos++;
    else cov_e2_zero++;
    if (tb_[N-3:N-5] == 3'b111) cov_mod_111++;
    // A negative digit in a row other than the last: its correction word is
    // carried by the next row.
    for (int j = 0; j < N/2 - 2; j++) begin
      logic [2:0] g;
      g = (j == 0) ? {tb_[1:0], 1'b0} : tb_[2*j+1 -: 3];
      if (g[2] && !(g[1] && g[0])) begin
        cov_ecw_moved++;
        break;
      end
    end
    for (int j = 0; j < N/2; j++) begin
      logic [2:0] g;
      g = (j == 0) ? {tb_[1:0], 1'b0} : tb_[2*j+1 -: 3];
      cov_digit[g]++;
    end
  endtask

  initial begin
    logic [N-1:0] corners [8];
    for (int i = 0; i < 8; i++) cov_digit[i] = 0;
    // 32-bit multiplier: 8 RB rows, 3 accumulation stages.
    checks++;
    if ($size(dut.row_p, 1) != 8 || dut.u_tree.STAGES != 3) begin
      failures++;
      $display("expected 8 RB rows and 3 accumulation stages");
    end
    corners[0] = '0;
    corners[1] = 1;
    corners[2] = '1;
    corners[3] = {1'b1, {(N-1){1'b0}}};
    corners[4] = {1'b0, {(N-1){1'b1}}};
    corners[5] = {(N/2){2'b10}};
    corners[6] = {(N/2){2'b01}};
    corners[7] = {1'b1, {(N-2){1'b0}}, 1'b1};
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 8; k++)
        apply(corners[i], corners[k]);
    for (int v = 0; v < NVEC; v++) begin
      logic [N-1:0] ra, rb;
      ra = $urandom();
      rb = $urandom();
      // Steer the top five multiplier bits through all 32 patterns.
      rb[N-1:N-5] = 5'(v);
      apply(ra, rb);
    end
    $display("coverage: E2=-1 %0d, E2=0 %0d, E2=+1 %0d, modified row 111 %0d, ECW moved %0d",
             cov_e2_neg, cov_e2_zero, cov_e2_pos, cov_mod_111, cov_ecw_moved);
    for (int i = 0; i < 8; i++) $display("coverage: Booth pattern %03b %0d", 3'(i), cov_digit[i]);
    if (cov_e2_neg == 0 || cov_e2_zero == 0 || cov_e2_pos == 0 || cov_mod_111 == 0 ||
        cov_ecw_moved == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    for (int i = 0; i < 8; i++) if (cov_digit[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

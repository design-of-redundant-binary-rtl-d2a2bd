// tb_q_merge: exhaustive test of the correction-digit merge. For every top
// multiplier pattern and every reachable 4-bit field {p19, p18, p21, p20}
// (p19 = ~p18), Q must equal the field plus E2, with E2 taken from the
// correction table: -1 for 000 and 010, +1 for 101, else 0.
module tb_q_merge;
  logic [2:0] b_top;
  logic p19, p18, p21, p20;
  logic q19, q18, q21, q20;

  q_merge dut (.*);

  int checks = 0, failures = 0;
  int cov_inc = 0, cov_dec = 0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bt = 0; bt < 8; bt++) begin
      for (int s = 0; s < 2; s++) begin
        for (int lo = 0; lo < 4; lo++) begin
          int e2, field, expect_q;
          b_top = 3'(bt);
          p18 = s[0];
          p19 = ~s[0];
          {p21, p20} = 2'(lo);
          #1;
          case (b_top)
            3'b000, 3'b010: e2 = -1;
            3'b101: e2 = 1;
            default: e2 = 0;
          endcase
          if (e2 > 0) cov_inc++;
          if (e2 < 0) cov_dec++;
          field = {p19, p18, p21, p20};
          expect_q = field + e2;
          checks++;
          if ({q19, q18, q21, q20} !== 4'(expect_q) || expect_q < 0 || expect_q > 15) begin
            failures++;
            $display("b=%03b field=%04b q=%b%b%b%b expected=%04b", b_top, 4'(field),
                     q19, q18, q21, q20, 4'(expect_q));
          end
        end
      end
    end
    if (cov_inc == 0 || cov_dec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

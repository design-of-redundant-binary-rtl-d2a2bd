// tb_q_direct: exhaustive test (all 256 input combinations) of the direct Q
// logic. The reference builds the unmodified bits from the Booth digits:
// p18 is the sign of digit(b1 b0 0) * A, p19 = ~p18, {p21, p20} the two low
// bits of the one's-complement row digit(b7 b6 b5) * A; E2 = negY - ~b5.
// Q must equal {p19, p18, p21, p20} + E2.
module tb_q_direct;
  logic [2:0] b_top;
  logic [1:0] b_low, a_low;
  logic       a_msb;
  logic       q19, q18, q21, q20;

  q_direct dut (.*);

  int checks = 0, failures = 0;
  int cov_cy = 0, cov_bw = 0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_of(input logic [2:0] g);
    case (g)
      3'b001, 3'b010: return 1;
      3'b011: return 2;
      3'b100: return -2;
      3'b101, 3'b110: return -1;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      int d0, dy, e2, field, expect_q;
      logic p18, p21, p20;
      logic [1:0] low;
      {b_top, b_low, a_msb, a_low} = 8'(i);
      #1;
      d0 = digit_of({b_low, 1'b0});
      dy = digit_of(b_top);
      p18 = (d0 == 0) ? 1'b0 : (d0 > 0) ? a_msb : ~a_msb;
      low = (dy == 1 || dy == -1) ? a_low : (dy == 2 || dy == -2) ? {a_low[0], 1'b0} : 2'b00;
      if (dy < 0) low = ~low;
      {p21, p20} = low;
      e2 = int'(dy < 0) - int'(!b_top[0]);
      field = 8 * int'(!p18) + 4 * int'(p18) + 2 * int'(p21) + int'(p20);
      expect_q = field + e2;
      if (e2 > 0 && low == 2'b11) cov_cy++;
      if (e2 < 0 && low == 2'b00) cov_bw++;
      checks++;
      if ({q19, q18, q21, q20} !== 4'(expect_q)) begin
        failures++;
        $display("in=%08b q=%b%b%b%b expected=%04b", 8'(i), q19, q18, q21, q20, 4'(expect_q));
      end
    end
    if (cov_cy == 0 || cov_bw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rb_half_adder: exhaustive test of the RB half-adder cell against the
// full-adder cell arithmetic with a zero second operand (bp = bm = 0),
// computed here from integer sums.
module tb_rb_half_adder;
  logic ap, am, c_in, d_in;
  logic c_out, d_out, zp, zm;

  rb_half_adder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int s1, t, lhs, rhs;
      {ap, am, c_in, d_in} = 4'(i);
      #1;
      s1 = int'(ap) + int'(!am);
      t  = (s1 % 2) + 1 + int'(c_in);
      checks++;
      if (c_out !== (s1 >= 2) || d_out !== (t >= 2) || zp !== d_in || zm !== !(t % 2)) begin
        failures++;
        $display("inputs %04b: c=%b d=%b z=%b%b", 4'(i), c_out, d_out, zp, zm);
      end
      lhs = 2 * (int'(c_out) + int'(d_out)) + int'(zp) - int'(zm);
      rhs = int'(ap) - int'(am) + int'(c_in) + int'(d_in) + 1;
      checks++;
      if (lhs != rhs) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rb_full_adder: exhaustive test of the RB full-adder cell. For all 64
// input combinations it checks the two full adders bit by bit and the value
// identity of the cell: 2(c_out + d_out) + (zp - zm) = (ap - am) + (bp - bm)
// + c_in + d_in + 1, i.e. the weighted outputs carry exactly the input value.
module tb_rb_full_adder;
  logic ap, am, bp, bm, c_in, d_in;
  logic c_out, d_out, zp, zm;

  rb_full_adder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int s1, t, lhs, rhs;
      {ap, am, bp, bm, c_in, d_in} = 6'(i);
      #1;
      s1  = int'(ap) + int'(!am) + int'(bp);
      t   = (s1 % 2) + int'(!bm) + int'(c_in);
      checks++;
      if (c_out !== (s1 >= 2) || d_out !== (t >= 2) || zp !== d_in || zm !== !(t % 2)) begin
        failures++;
        $display("inputs %06b: c=%b d=%b z=%b%b", 6'(i), c_out, d_out, zp, zm);
      end
      lhs = 2 * (int'(c_out) + int'(d_out)) + int'(zp) - int'(zm);
      rhs = int'(ap) - int'(am) + int'(bp) - int'(bm) + int'(c_in) + int'(d_in) + 1;
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("identity fails for %06b: %0d vs %0d", 6'(i), lhs, rhs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

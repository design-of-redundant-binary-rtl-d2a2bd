// tb_rb_accum_stage: checks one RB accumulation stage (64 digits) with
// random RB operands: (z_p - z_m) must equal (a_p - a_m) + (b_p - b_m)
// modulo 2^64. A second instance with 8 half-adder digits gets operands b
// whose low 8 bits are zero, as in the first tree stage.
module tb_rb_accum_stage;
  localparam int W = 64;

  logic [W-1:0] a_p, a_m, b_p, b_m, z_p, z_m, z2_p, z2_m, b2_p, b2_m;

  rb_accum_stage dut (.a_p(a_p), .a_m(a_m), .b_p(b_p), .b_m(b_m), .z_p(z_p), .z_m(z_m));
  rb_accum_stage #(.W(W), .HALF_LSBS(8)) dut_h (
    .a_p(a_p), .a_m(a_m), .b_p(b2_p), .b_m(b2_m), .z_p(z2_p), .z_m(z2_m));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 20000; v++) begin
      a_p = {$urandom(), $urandom()};
      a_m = {$urandom(), $urandom()};
      b_p = {$urandom(), $urandom()};
      b_m = {$urandom(), $urandom()};
      if (v < 4) begin
        a_p = v[0] ? '1 : '0;
        a_m = v[0] ? '0 : '1;
        b_p = v[1] ? '1 : '0;
        b_m = v[1] ? '0 : '1;
      end
      b2_p = {b_p[W-1:8], 8'h00};
      b2_m = {b_m[W-1:8], 8'h00};
      #1;
      checks++;
      if (z_p - z_m !== (a_p - a_m) + (b_p - b_m)) begin
        failures++;
        if (failures < 10) $display("full: mismatch");
      end
      checks++;
      if (z2_p - z2_m !== (a_p - a_m) + (b2_p - b2_m)) begin
        failures++;
        if (failures < 10) $display("half-lsb: mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

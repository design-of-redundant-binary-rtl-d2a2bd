// tb_rbbe2_row: checks one RBBE-2 row generator (32-bit, standard and
// modified X encoder). For random multiplicands and all 64 combinations of
// the two Booth groups, plus - minus + (negX - 1) + 4 negY + 2^(N+1) must
// equal (digitX + 4 digitY) * A, with the digits taken from the Booth table
// (the modified encoder codes 111 as -0, so its negX is b[2j+1]).
module tb_rbbe2_row;
  localparam int N = 32;

  logic [N-1:0] a;
  logic [2:0]   bits_x, bits_y;
  logic [N+1:0] plus, plus_m;
  logic [N+2:0] minus, minus_m;
  logic         neg_x, neg_y, neg_x_m, neg_y_m;

  rbbe2_row dut (.a(a), .bits_x(bits_x), .bits_y(bits_y), .plus(plus), .minus(minus),
                 .neg_x(neg_x), .neg_y(neg_y));
  rbbe2_row #(.N(N), .MODIFIED_X(1'b1)) dut_m (
    .a(a), .bits_x(bits_x), .bits_y(bits_y), .plus(plus_m), .minus(minus_m),
    .neg_x(neg_x_m), .neg_y(neg_y_m));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint digit_of(input logic [2:0] g);
    case (g)
      3'b001, 3'b010: return 1;
      3'b011: return 2;
      3'b100: return -2;
      3'b101, 3'b110: return -1;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int v = 0; v < 300; v++) begin
      a = (v == 0) ? {1'b1, {(N-1){1'b0}}} : (v == 1) ? '1 : $urandom();
      for (int g = 0; g < 64; g++) begin
        longint expect_v, got_v, got_m, dx, dy;
        {bits_x, bits_y} = 6'(g);
        #1;
        dx = digit_of(bits_x);
        dy = digit_of(bits_y);
        expect_v = (dx + 4 * dy) * longint'($signed(a));
        got_v = longint'(plus) - longint'(minus) + longint'(neg_x) - 1 + 4 * longint'(neg_y)
              + (longint'(1) << (N + 1));
        got_m = longint'(plus_m) - longint'(minus_m) + longint'(neg_x_m) - 1
              + 4 * longint'(neg_y_m) + (longint'(1) << (N + 1));
        checks += 2;
        if (got_v != expect_v) begin
          failures++;
          if (failures < 10) $display("std a=%h x=%03b y=%03b got=%0d exp=%0d", a, bits_x, bits_y, got_v, expect_v);
        end
        if (got_m != expect_v || neg_x_m !== bits_x[2]) begin
          failures++;
          if (failures < 10) $display("mod a=%h x=%03b y=%03b got=%0d exp=%0d", a, bits_x, bits_y, got_m, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mbe_decoder: checks the Booth row decoder at its default width. For
// random and corner multiplicands and every digit (0, +-1, +-2, and the
// forced all-ones "-0"), the row read as an (N+1)-bit two's-complement
// number plus the neg bit must equal digit * A.
module tb_mbe_decoder;
  import rbm_pkg::*;
  localparam int N = 32;

  logic [N-1:0] a;
  mbe_code_t    code;
  logic [N:0]   pp;

  mbe_decoder dut (.a(a), .code(code), .pp(pp));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] ta, input int d, input bit minus_zero);
    longint expect_v, got_v;
    a = ta;
    code.one    = (d == 1 || d == -1);
    code.two    = (d == 2 || d == -2);
    code.neg    = (d < 0) || minus_zero;
    code.force1 = minus_zero;
    #1;
    expect_v = longint'($signed(ta)) * d;
    got_v    = longint'($signed(pp)) + longint'(code.neg);
    checks++;
    if (got_v != expect_v || (minus_zero && pp !== '1)) begin
      failures++;
      if (failures < 10) $display("a=%h d=%0d m0=%0d pp=%h", ta, d, minus_zero, pp);
    end
  endtask

  initial begin
    logic [N-1:0] ta;
    for (int v = 0; v < 2000; v++) begin
      case (v)
        0: ta = '0;
        1: ta = '1;
        2: ta = {1'b1, {(N-1){1'b0}}};
        3: ta = {1'b0, {(N-1){1'b1}}};
        default: ta = $urandom();
      endcase
      for (int d = -2; d <= 2; d++) check_one(ta, d, 1'b0);
      check_one(ta, 0, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

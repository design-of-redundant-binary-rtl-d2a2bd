// tb_rb_nb_converter: checks the RB-to-binary converter: p = x_p - x_m modulo
// 2^W, for W = 64 with 8-bit blocks (default) and W = 128 with 16-bit blocks.
// Operands include long carry chains (x_m = 0, x_p all ones) so that a
// carry must cross every block.
module tb_rb_nb_converter;
  logic [63:0]  x_p, x_m, p;
  logic [127:0] y_p, y_m, q;

  rb_nb_converter dut (.x_p(x_p), .x_m(x_m), .p(p));
  rb_nb_converter #(.W(128), .BLK(16)) dut128 (.x_p(y_p), .x_m(y_m), .p(q));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 50000; v++) begin
      x_p = {$urandom(), $urandom()};
      x_m = {$urandom(), $urandom()};
      y_p = {$urandom(), $urandom(), $urandom(), $urandom()};
      y_m = {$urandom(), $urandom(), $urandom(), $urandom()};
      case (v)
        0: begin x_p = '1; x_m = '0; y_p = '1; y_m = '0; end
        1: begin x_p = '0; x_m = 1;  y_p = '0; y_m = 1;  end
        2: begin x_p = '0; x_m = '0; y_p = '0; y_m = '0; end
        3: begin x_p = 64'h8000_0000_0000_0000; x_m = 1; y_p = {1'b1, 127'b0}; y_m = 1; end
        4: begin x_p = 64'h00ff_00ff_00ff_00ff; x_m = 64'h0100_0100_0100_0100;
                 y_p = {2{x_p}}; y_m = {2{x_m}}; end
        default: ;
      endcase
      #1;
      checks += 2;
      if (p !== x_p - x_m) begin
        failures++;
        if (failures < 10) $display("W=64 %h - %h -> %h", x_p, x_m, p);
      end
      if (q !== y_p - y_m) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

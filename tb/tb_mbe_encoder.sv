// tb_mbe_encoder: exhaustive test of the radix-4 Booth encoder, standard and
// modified. The expected controls come from the Booth digit table written
// out in the testbench: digit -> (one, two, neg); the modified encoder must
// differ only for 111, where it asserts force1 and neg.
module tb_mbe_encoder;
  import rbm_pkg::*;

  logic [2:0] bits;
  mbe_code_t  code_std, code_mod;

  mbe_encoder #(.MODIFIED(1'b0)) dut_std (.bits(bits), .code(code_std));
  mbe_encoder #(.MODIFIED(1'b1)) dut_mod (.bits(bits), .code(code_mod));

  int checks = 0, failures = 0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_of(input logic [2:0] g);
    case (g)
      3'b000: return 0;
      3'b001, 3'b010: return 1;
      3'b011: return 2;
      3'b100: return -2;
      3'b101, 3'b110: return -1;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin
      int d;
      mbe_code_t e;
      bits = 3'(i);
      #1;
      d = digit_of(bits);
      e.one    = (d == 1 || d == -1);
      e.two    = (d == 2 || d == -2);
      e.neg    = (d < 0);
      e.force1 = 1'b0;
      checks++;
      if (code_std !== e) begin
        failures++;
        $display("standard %03b: got %b expected %b", bits, code_std, e);
      end
      if (bits == 3'b111) begin
        e.neg    = 1'b1;
        e.force1 = 1'b1;
      end
      checks++;
      if (code_mod !== e) begin
        failures++;
        $display("modified %03b: got %b expected %b", bits, code_mod, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

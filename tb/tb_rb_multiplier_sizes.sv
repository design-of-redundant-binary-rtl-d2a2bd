// tb_rb_multiplier_sizes: the multiplier at the other word lengths of the
// design family: 8 x 8 (exhaustive, one accumulation stage), 16 x 16 and
// 64 x 64 (random, two and four stages). Products are compared with the
// simulator's signed multiplication. The row and stage counts of each
// instance are checked too: 2/1, 4/2 and 16/4.
module tb_rb_multiplier_sizes;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  logic [15:0]  a16, b16;
  logic [31:0]  p16;
  logic [63:0]  a64, b64;
  logic [127:0] p64;

  rb_multiplier #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  rb_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  rb_multiplier #(.N(64)) dut64 (.a(a64), .b(b64), .p(p64));

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Row and accumulation-stage counts per word length: N/4 rows,
    // log2(N/4) stages.
    checks++;
    if ($size(dut8.row_p, 1) != 2 || $size(dut16.row_p, 1) != 4 || $size(dut64.row_p, 1) != 16 ||
        dut8.u_tree.STAGES != 1 || dut16.u_tree.STAGES != 2 || dut64.u_tree.STAGES != 4) begin
      failures++;
      $display("row or stage count differs from N/4 rows, log2(N/4) stages");
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      a16 = $urandom();
      b16 = $urandom();
      a64 = {$urandom(), $urandom()};
      b64 = {$urandom(), $urandom()};
      if (i == 1) begin a64 = {1'b1, 63'b0}; b64 = {1'b1, 63'b0}; end
      if (i == 2) begin a64 = '1; b64 = {1'b0, {63{1'b1}}}; end
      #1;
      checks += 3;
      if (p8 !== 16'($signed(a8) * $signed(b8))) begin
        failures++;
        if (failures < 10) $display("N=8 %h * %h -> %h", a8, b8, p8);
      end
      if (p16 !== 32'($signed({{16{a16[15]}}, a16}) * $signed({{16{b16[15]}}, b16}))) failures++;
      if (p64 !== 128'($signed({{64{a64[63]}}, a64}) * $signed({{64{b64[63]}}, b64}))) begin
        failures++;
        if (failures < 10) $display("N=64 %h * %h -> %h", a64, b64, p64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

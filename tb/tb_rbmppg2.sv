// tb_rbmppg2: checks the RB partial-product generator. The sum of all rows,
// each taken as plus - minus, must equal A * B modulo 2^(2N). The 32-bit
// generator (default) gets corner and random operands and must produce 8
// rows; an 8-bit instance is checked exhaustively (all 65536 operand pairs)
// and must produce 2 rows. Both are tested with Q taken directly from the
// operand bits (default) and from the decoder outputs.
module tb_rbmppg2;
  localparam int N  = 32;
  localparam int N8 = 8;

  logic [N-1:0]              a, b;
  logic [N/4-1:0][2*N-1:0]   row_p, row_m;
  logic [N8-1:0]             a8, b8;
  logic [N8/4-1:0][2*N8-1:0] row8_p, row8_m;

  rbmppg2 dut (.a(a), .b(b), .row_p(row_p), .row_m(row_m));
  rbmppg2 #(.N(N8)) dut8 (.a(a8), .b(b8), .row_p(row8_p), .row_m(row8_m));

  // The same generators with Q taken from the decoder outputs (q_merge).
  logic [N/4-1:0][2*N-1:0]   rowq_p, rowq_m;
  logic [N8/4-1:0][2*N8-1:0] rowq8_p, rowq8_m;
  rbmppg2 #(.N(N), .DIRECT_Q(1'b0))  dutq  (.a(a), .b(b), .row_p(rowq_p), .row_m(rowq_m));
  rbmppg2 #(.N(N8), .DIRECT_Q(1'b0)) dutq8 (.a(a8), .b(b8), .row_p(rowq8_p), .row_m(rowq8_m));

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0]  acc, expect_p;
    logic [2*N8-1:0] acc8, expect8;
    checks++;
    if ($size(row_p, 1) != 8 || $size(row8_p, 1) != 2) failures++;
    for (int v = 0; v < 20000; v++) begin
      a = $urandom();
      b = $urandom();
      if (v < 16) begin
        a = (v[1:0] == 0) ? '0 : (v[1:0] == 1) ? '1 : (v[1:0] == 2) ? {1'b1, 31'b0} : {1'b0, {31{1'b1}}};
        b = (v[3:2] == 0) ? '0 : (v[3:2] == 1) ? '1 : (v[3:2] == 2) ? {1'b1, 31'b0} : {1'b0, {31{1'b1}}};
      end
      #1;
      acc = '0;
      for (int r = 0; r < N/4; r++) acc = acc + row_p[r] - row_m[r];
      expect_p = $signed({{N{a[N-1]}}, a}) * $signed({{N{b[N-1]}}, b});
      checks++;
      if (acc !== expect_p) begin
        failures++;
        if (failures < 10) $display("N=32 a=%h b=%h sum=%h expected=%h", a, b, acc, expect_p);
      end
      acc = '0;
      for (int r = 0; r < N/4; r++) acc = acc + rowq_p[r] - rowq_m[r];
      checks++;
      if (acc !== expect_p) failures++;
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      acc8 = '0;
      for (int r = 0; r < N8/4; r++) acc8 = acc8 + row8_p[r] - row8_m[r];
      expect8 = $signed({{N8{a8[N8-1]}}, a8}) * $signed({{N8{b8[N8-1]}}, b8});
      checks++;
      if (acc8 !== expect8) begin
        failures++;
        if (failures < 10) $display("N=8 a=%h b=%h sum=%h expected=%h", a8, b8, acc8, expect8);
      end
      acc8 = '0;
      for (int r = 0; r < N8/4; r++) acc8 = acc8 + rowq8_p[r] - rowq8_m[r];
      checks++;
      if (acc8 !== expect8) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

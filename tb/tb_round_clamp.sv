// tb_round_clamp: drives random and corner values through round_clamp for
// every shift 0..12 and width 2..8 and compares with an integer model:
// floor(x / 2^s) plus the first dropped bit, clamped to the signed n-bit range.
module tb_round_clamp;
  logic signed [23:0] x;
  logic [4:0] shift;
  logic [3:0] nbits;
  logic signed [7:0] y;
  int checks = 0, failures = 0;

  round_clamp #(.IN_W(24), .OUT_W(8)) dut (.x, .shift, .nbits, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int xv, input int s, input int n);
    int e;
    x = 24'(xv); shift = 5'(s); nbits = 4'(n);
    #1;
    e = mp_pkg::round_clamp_ref(longint'(xv), s, n);
    checks++;
    if (int'(y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d s=%0d n=%0d got %0d exp %0d", xv, s, n, y, e);
    end
  endtask

  initial begin
    // the worked example: 20.048 -> 20 (value 20 at 4 fraction bits is 1.25)
    check(321, 4, 8);   // 321/16 = 20.06 -> 20
    check(328, 4, 8);   // 20.5 rounds up to 21
    check(327, 4, 8);   // 20.44 -> 20
    check(5000, 4, 8);  // clamps to 127
    check(-5000, 4, 8); // clamps to -128
    for (int s = 0; s <= 12; s++)
      for (int n = 2; n <= 8; n++)
        for (int k = 0; k < 40; k++)
          check(int'($urandom % 40000) - 20000, s, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_conv_kernel: random signed 7-bit weights and 6-bit features, including
// the extreme values, against a direct dot product of the nine taps.
module tb_conv_kernel;
  localparam int M = 7, N = 6;
  logic [8:0][M-1:0] w;
  logic [8:0][N-1:0] a;
  logic signed [M+N+3:0] sum;
  int checks = 0, failures = 0;
  conv_kernel #(.K(3), .M(M), .N(N)) dut (.w, .a, .sum);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 500; k++) begin
      automatic int e = 0;
      for (int t = 0; t < 9; t++) begin
        automatic int wv, av;
        wv = (k == 0) ? -64 : (k == 1) ? 63 : int'($urandom % 128) - 64;
        av = (k == 0) ? -32 : (k == 1) ? 31 : int'($urandom % 64) - 32;
        w[t] = M'(wv);
        a[t] = N'(av);
        e += wv * av;
      end
      #1;
      checks++;
      if (int'(sum) != e) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", sum, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

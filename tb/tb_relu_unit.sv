// tb_relu_unit: ReLU must pass positive values and output zero otherwise.
module tb_relu_unit;
  logic signed [15:0] x, y;
  int checks = 0, failures = 0;
  relu_unit #(.W(16)) dut (.x, .y);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    automatic int v[] = '{0, 1, -1, 32767, -32768, 100, -100};
    for (int i = 0; i < 7 + 200; i++) begin
      automatic int xv = (i < 7) ? v[i] : int'($urandom % 65536) - 32768;
      x = 16'(xv);
      #1;
      checks++;
      if (int'(y) != ((xv > 0) ? xv : 0)) begin
        failures++;
        $display("FAIL x=%0d y=%0d", xv, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_channel_adder_tree: for S = 48 and every tree level, each output must be
// the sum of its 2^level neighbouring inputs, and outputs past the level's
// count must be zero.
module tb_channel_adder_tree;
  localparam int S = 48, IN_W = 12, LV = 6;
  logic signed [S-1:0][IN_W-1:0] x;
  logic [2:0] level;
  logic signed [S-1:0][IN_W+LV-1:0] y;
  int checks = 0, failures = 0;
  int xv [S];
  channel_adder_tree #(.S(S), .IN_W(IN_W)) dut (.x, .level, .y);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 20; k++) begin
      for (int i = 0; i < S; i++) begin
        xv[i] = int'($urandom % 4096) - 2048;
        x[i] = IN_W'(xv[i]);
      end
      for (int d = 0; d <= LV; d++) begin
        level = 3'(d);
        #1;
        for (int j = 0; j < S; j++) begin
          automatic int e = 0;
          for (int i = j << d; i < ((j + 1) << d) && i < S; i++) e += xv[i];
          checks++;
          if (int'($signed(y[j])) != e) begin
            failures++;
            if (failures < 10) $display("FAIL d=%0d j=%0d got %0d exp %0d", d, j, $signed(y[j]), e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fc_pe: streams 64 random 8-bit features with random 8-bit weight
// columns (with idle gaps) into the 10-MAC FC PE and compares the 10 logits
// with a software dot product; done must pulse once, right after the 64th
// input. Three runs check that start clears the accumulators.
module tb_fc_pe;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, done;
  logic signed [7:0] x;
  logic signed [9:0][7:0] w;
  logic signed [9:0][23:0] acc;
  int checks = 0, failures = 0;
  int ref_acc [10];
  int ndone = 0;

  fc_pe #(.NIN(64), .NOUT(10), .WB(8), .XB(8), .ACC_W(24)) dut (
    .clk, .rst_n, .start, .in_valid, .x, .w, .acc, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (done) ndone++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      ndone = 0;
      for (int k = 0; k < 10; k++) ref_acc[k] = 0;
      for (int i = 0; i < 64; i++) begin
        x = 8'($urandom);
        for (int k = 0; k < 10; k++) begin
          w[k] = 8'($urandom);
          ref_acc[k] += int'($signed(w[k])) * int'(x);
        end
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        if ($urandom % 3 == 0) @(negedge clk);
      end
      @(negedge clk);
      for (int k = 0; k < 10; k++) begin
        automatic logic signed [23:0] a = acc[k];
        checks++;
        if (int'(a) != ref_acc[k]) begin
          failures++;
          $display("FAIL run %0d logit %0d got %0d exp %0d", run, k, a, ref_acc[k]);
        end
      end
      checks++;
      if (ndone != 1) begin failures++; $display("FAIL done pulsed %0d times", ndone); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

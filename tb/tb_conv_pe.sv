// tb_conv_pe: a PE with S = 16 groups of 7x6 multipliers gets a new random
// window set every cycle with a random tree level (1..4), bias, shift and
// output width held per burst (the PE takes them as per-layer settings). Each result is compared with a model (window
// dot products, sum over 2^level groups, + bias, ReLU, round, clamp) and must
// appear exactly 4 cycles after its inputs, with its tag.
module tb_conv_pe;
  import mp_pkg::*;
  localparam int S = 16, M = 7, N = 6, LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [15:0] in_tag = '0;
  logic [S-1:0][8:0][N-1:0] win;
  logic [S-1:0][8:0][M-1:0] wgt;
  logic signed [S-1:0][15:0] bias;
  int bias_i [S];                     // per-lane bias as plain integers
  always_comb for (int g = 0; g < S; g++) bias[g] = 16'(bias_i[g]);
  logic [2:0] level;
  logic [4:0] shift;
  logic [3:0] nbits;
  logic out_valid;
  logic [15:0] out_tag;
  logic signed [S-1:0][7:0] out;
  int checks = 0, failures = 0;
  localparam int NRES = 12 * 20;
  int exp_m [NRES][S];                 // expected lanes, indexed by tag
  int cyc_m [NRES];                    // issue cycle, indexed by tag
  int n_out = 0, n_in = 0;
  int ws [S];
  int cycle = 0;
  initial for (int g = 0; g < S; g++) bias_i[g] = 0;

  conv_pe #(.S(S), .M(M), .N(N), .K(3), .OUT_W(8), .BIAS_W(16), .TAG_W(16)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .win, .wgt, .bias, .level, .shift, .nbits,
    .out_valid, .out_tag, .out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    automatic int c0 = cyc_m[n_out];
    checks++;
    if (cycle - c0 != LAT || out_tag != 16'(n_out)) begin
      failures++;
      $display("FAIL latency %0d tag %0d", cycle - c0, out_tag);
    end
    for (int j = 0; j < S; j++) begin
      automatic logic signed [7:0] o = out[j];
      checks++;
      if (int'(o) != exp_m[n_out][j]) begin
        failures++;
        if (failures < 10) $display("FAIL result %0d lane %0d got %0d exp %0d", n_out, j, o, exp_m[n_out][j]);
      end
    end
    n_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int burst = 0; burst < 12; burst++) begin
      in_valid = 0;
      repeat (LAT + 1) @(negedge clk);   // let the previous burst drain
      level = 3'(1 + burst % 4);
      shift = 5'(2 + burst % 5);
      nbits = 4'(5 + burst % 4);
      for (int g = 0; g < S; g++) bias_i[g] = int'($urandom % 2048) - 1024;
      @(negedge clk);                    // settings are steady before the burst
      for (int n = 0; n < 20; n++) begin
        for (int g = 0; g < S; g++) begin
          ws[g] = 0;
          for (int t = 0; t < 9; t++) begin
            automatic int wv = int'($urandom % 128) - 64;
            automatic int av = int'($urandom % 64) - 32;
            wgt[g][t] = M'(wv);
            win[g][t] = N'(av);
            ws[g] += wv * av;
          end
        end
        for (int j = 0; j < S; j++) begin
          automatic longint acc = 0;
          if (j < (S >> level)) begin
            for (int g = j << level; g < ((j + 1) << level); g++) acc += ws[g];
            acc += bias_i[j];
          end else acc = bias_i[j];
          if (acc < 0) acc = 0;
          exp_m[n_in][j] = round_clamp_ref(acc, shift, nbits);
        end
        cyc_m[n_in] = cycle;
        in_tag = 16'(n_in);
        n_in++;
        in_valid = 1;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != NRES) begin failures++; $display("FAIL %0d of %0d results", n_out, NRES); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

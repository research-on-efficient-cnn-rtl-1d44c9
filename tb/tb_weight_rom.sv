// tb_weight_rom: builds two ROMs of the 7x6 PE (groups 5 and 70) at the
// depth that PE needs, reads every word with random addresses and compares
// each K x K kernel with the reference placement: word weight_base(l)+p of
// group g holds output channel p*outs_per_pass(l) + g/G, input channel g mod G.
// Also checks the one-cycle read latency.
module tb_weight_rom;
  import mp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int unsigned PE = 1, M = 7, DEPTH = rom_depth(PE);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned GR [2] = '{5, 70};
  logic [AW-1:0] addr = '0;
  logic [9*M-1:0] data [2];
  int checks = 0, failures = 0;

  for (genvar r = 0; r < 2; r++) begin : g_rom
    weight_rom #(.PE_IDX(PE), .GROUP(GR[r]), .K(3), .M(M), .DEPTH(DEPTH)) u_rom (
      .clk, .addr, .data(data[r]));
  end

  function automatic logic [9*M-1:0] ref_word(input int unsigned g, input int unsigned a);
    logic [9*M-1:0] w = '0;
    for (int l = 0; l < int'(NUM_CONV); l++)
      if (32'(layer_cfg(l).pe) == PE)
        for (int p = 0; p < int'(passes(l)); p++)
          if (weight_base(l) + p == a)
            for (int t = 0; t < 9; t++)
              w[t*M +: M] = M'(weight_val(l, p * outs_per_pass(l) + (g >> layer_cfg(l).log2g),
                                          g & ((1 << layer_cfg(l).log2g) - 1), t));
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int nonzero = 0;
    @(negedge clk);
    for (int n = 0; n < 3 * int'(DEPTH); n++) begin
      automatic int unsigned a = (n < int'(DEPTH)) ? n : $urandom % DEPTH;
      addr = AW'(a);
      @(negedge clk);
      for (int r = 0; r < 2; r++) begin
        checks++;
        if (data[r] != ref_word(GR[r], a)) begin
          failures++;
          if (failures < 10) $display("FAIL group %0d addr %0d", GR[r], a);
        end
        if (data[r] != '0) nonzero++;
      end
    end
    checks++;
    if (nonzero == 0) begin failures++; $display("FAIL all words zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

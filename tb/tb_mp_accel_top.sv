// tb_mp_accel_top: end-to-end test of the accelerator at its default size.
//
// A behavioural AXI4 memory holds a generated 32x32x3 image. The testbench
// starts the accelerator, waits for done, and compares (a) every value of the
// final 64-channel 8x8 feature map in the result RAM and (b) the 10 logits
// with a reference model of the same network written here from the package's
// layer table and generator functions (zero padding 1, stride 1 or 2, bias,
// ReLU, round half up, clamp; average pooling; FC). It also checks that each
// convolution instruction runs at one 3x3 window per cycle (tiles * 24 cycles
// plus a fixed overhead) and counts the mechanisms the design relies on:
// register-buffer read/write overlap, writer stalls on a busy row, padding
// masks, stride-2 subsampling, PE switches, every adder-tree level, layer
// changes on a shared PE, AXI bursts and handshake stalls, clamping.
module tb_mp_accel_top;
  import mp_pkg::*;

  localparam int unsigned SEED = 32'h1234;
  localparam logic [31:0] BASE = 32'h0001_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] araddr; logic [7:0] arlen; logic [2:0] arsize; logic [1:0] arburst;
  logic arvalid, arready, rlast, rvalid, rready, busy, done;
  logic [15:0] rdata; logic [1:0] rresp;
  logic signed [FC_OUT-1:0][23:0] logits;
  int bursts, axi_stalls;

  mp_accel_top dut (
    .clk, .rst_n, .start, .img_base(BASE),
    .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready), .m_rdata(rdata), .m_rresp(rresp),
    .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .busy, .done, .logits);

  axi_mem_model #(.SEED(SEED), .H(IMG_H), .W(IMG_W), .BASE(BASE)) u_mem (
    .clk, .rst_n, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rdata, .rresp, .rlast, .rvalid, .rready, .bursts, .stalls(axi_stalls));

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference model ----------------
  int fm  [64][32][32];
  int nfm [64][32][32];
  int ref_logits [FC_OUT];
  int lay [NUM_CONV][64][32][32];   // reference output of every layer
  int clamps = 0;

  task automatic ref_run();
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) fm[c][y][x] = image_pixel(SEED, c, y, x);
    for (int l = 0; l < int'(NUM_CONV); l++) begin
      layer_cfg_t c = layer_cfg(l);
      int h = c.hin, ho = c.stride2 ? c.hin / 2 : c.hin, st = c.stride2 ? 2 : 1;
      for (int o = 0; o < int'(c.cout); o++)
        for (int yo = 0; yo < ho; yo++)
          for (int xo = 0; xo < ho; xo++) begin
            longint acc = 0;
            int r;
            for (int i = 0; i < int'(c.cin); i++)
              for (int t = 0; t < 9; t++) begin
                int y = yo * st + t / 3 - 1, x = xo * st + t % 3 - 1;
                if (y >= 0 && y < h && x >= 0 && x < h)
                  acc += longint'(weight_val(l, o, i, t)) * fm[i][y][x];
              end
            acc += bias_val(l, o);
            if (acc < 0) acc = 0;
            r = round_clamp_ref(acc, c.shift, c.abits_out);
            if (r == (1 << (c.abits_out - 1)) - 1) clamps++;
            nfm[o][yo][xo] = r;
          end
      for (int o = 0; o < int'(c.cout); o++)
        for (int y = 0; y < ho; y++)
          for (int x = 0; x < ho; x++) begin
            fm[o][y][x] = nfm[o][y][x];
            lay[l][o][y][x] = nfm[o][y][x];
          end
    end
    for (int k = 0; k < int'(FC_OUT); k++) ref_logits[k] = 0;
    for (int i = 0; i < 64; i++) begin
      int s = 0, avg;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) s += fm[i][y][x];
      avg = s >>> 6;
      for (int k = 0; k < int'(FC_OUT); k++) ref_logits[k] += fc_weight(k, i) * avg;
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_overlap = 0, n_wstall = 0, n_pad = 0, n_stride2_drop = 0, n_pe_switch = 0;
  int n_layer_switch_shared = 0, n_instr = 0, n_rate_checked = 0;
  int level_seen [8] = '{default: 0};
  int last_pe = -1, last_layer = -1;
  longint t_start;

  // monitors sample on the falling edge, away from the design's updates
  always @(negedge clk) if (rst_n) begin
    if (dut.rb_wr_en && dut.rb_win_take) n_overlap++;
    if (dut.u_ctrl.state == dut.u_ctrl.C_CONV && !dut.u_ctrl.is_done && !dut.u_ctrl.issue) n_wstall++;
    if (dut.rb_wr_en && dut.rb_zero_mask != 0) n_pad++;
    if (dut.pe_out_valid && !dut.wb_en && dut.u_ctrl.cfg.stride2) n_stride2_drop++;
    if (dut.ins_valid) begin
      n_instr++;
      t_start = cycle;
      if (last_pe != -1 && int'(dut.ins.pe_id) != last_pe) n_pe_switch++;
      if (last_layer != -1 && int'(dut.ins.layer_id) != last_layer && int'(dut.ins.pe_id) == last_pe)
        n_layer_switch_shared++;
      last_pe = dut.ins.pe_id;
      last_layer = dut.ins.layer_id;
    end
    if (dut.pe_valid) level_seen[dut.cfg_level]++;
    if (dut.ins_done && dut.cfg_pe != 2'd3) begin
      // one window per cycle: tiles * 24 cycles plus at most 24 cycles of fill and drain
      automatic int h = dut.u_ctrl.cfg.hin;
      automatic longint bound = longint'(((h + 3) / 4) * ((h + 5) / 6) * 24 + 24);
      checks++;
      n_rate_checked++;
      if (cycle - t_start > bound) begin
        failures++;
        $display("FAIL rate: instruction %0d took %0d cycles, bound %0d", n_instr, cycle - t_start, bound);
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // snapshot of both feature RAMs when a layer completes and when the run ends
  logic [15:0] snap [2][64][1024];
  logic layer_end;
  int   end_layer;
  assign layer_end = dut.ins_done && dut.cfg_pe != 2'd3 &&
                     int'(dut.u_ctrl.ins.weight_id) == int'(passes(int'(dut.u_ctrl.ins.layer_id))) - 1;
  for (genvar ch = 0; ch < 64; ch++) begin : g_snap
    always @(negedge clk)
      if (done || layer_end)
        for (int a = 0; a < 1024; a++) begin
          snap[0][ch][a] = dut.g_lane[ch].g_ram[0].u_ram.mem[a];
          snap[1][ch][a] = dut.g_lane[ch].g_ram[1].u_ram.mem[a];
        end
  end

  function automatic int ram_pixel(input int r, input int ch, input int y, input int x, input int h);
    int p = (y + 1) * (h + 2) + x + 1;
    logic [15:0] w;
    w = snap[r][ch][p >> 1];
    return int'($signed(p[0] ? w[15:8] : w[7:0]));
  endfunction

  // compare every completed layer with the reference, one cycle after its snapshot
  logic cmp_q = 1'b0;
  int   cmp_layer, cmp_ram;
  int   layer_fail [NUM_CONV] = '{default: 0};
  always @(negedge clk) begin
    cmp_q <= layer_end;
    if (layer_end) begin
      cmp_layer <= int'(dut.u_ctrl.ins.layer_id);
      cmp_ram   <= int'(dut.u_ctrl.ins.result_id[0]);
    end
    if (cmp_q) begin
      automatic layer_cfg_t c = layer_cfg(cmp_layer);
      automatic int ho = c.stride2 ? c.hin / 2 : c.hin;
      for (int o = 0; o < int'(c.cout); o++)
        for (int y = 0; y < ho; y++)
          for (int x = 0; x < ho; x++) begin
            automatic int got = ram_pixel(cmp_ram, o, y, x, ho);
            checks++;
            if (got != lay[cmp_layer][o][y][x]) begin
              failures++;
              layer_fail[cmp_layer]++;
              if (layer_fail[cmp_layer] < 4)
                $display("FAIL layer %0d ch%0d y%0d x%0d got %0d exp %0d", cmp_layer + 1, o, y, x, got, lay[cmp_layer][o][y][x]);
            end
          end
    end
  end

  initial begin
    longint t0;
    int dst;
    ref_run();
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = cycle;
    wait (done);
    repeat (2) @(posedge clk);
    $display("run finished in %0d cycles, %0d instructions", cycle - t0, n_instr);

    // final feature map: layer 21 writes result RAM of program_instr(last conv)
    dst = program_instr(program_len() - 2).result_id[0];
    for (int c = 0; c < 64; c++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          automatic int got = ram_pixel(dst, c, y, x, 8);
          checks++;
          if (got != fm[c][y][x]) begin
            failures++;
            if (failures < 10) $display("FAIL fmap c%0d y%0d x%0d got %0d exp %0d", c, y, x, got, fm[c][y][x]);
          end
        end
    for (int k = 0; k < int'(FC_OUT); k++) begin
      checks++;
      if (int'($signed(logits[k])) != ref_logits[k]) begin
        failures++;
        $display("FAIL logit %0d got %0d exp %0d", k, int'($signed(logits[k])), ref_logits[k]);
      end
    end
    checks++;
    if (n_instr != int'(program_len())) begin failures++; $display("FAIL instruction count %0d", n_instr); end

    $display("mechanisms: overlap=%0d writer_stall=%0d pad_mask=%0d stride2_drop=%0d pe_switch=%0d shared_layer_switch=%0d bursts=%0d axi_stalls=%0d clamps=%0d rate_checks=%0d",
             n_overlap, n_wstall, n_pad, n_stride2_drop, n_pe_switch, n_layer_switch_shared, bursts, axi_stalls, clamps, n_rate_checked);
    $display("tree levels used: 2:%0d 4:%0d 5:%0d 6:%0d", level_seen[2], level_seen[4], level_seen[5], level_seen[6]);
    begin
      int counts [10];
      counts = '{n_overlap, n_wstall, n_pad, n_stride2_drop, n_pe_switch,
                 n_layer_switch_shared, axi_stalls, clamps, level_seen[2], level_seen[6]};
      for (int m = 0; m < 10; m++) begin
        checks++;
        if (counts[m] == 0) begin failures++; $display("FAIL mechanism %0d never happened", m); end
      end
      checks++;
      if (bursts != 6 || level_seen[4] == 0 || level_seen[5] == 0) begin
        failures++; $display("FAIL bursts=%0d or tree levels 4/5 unused", bursts);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mp_accel_top: mixed-precision ResNet20 accelerator for 32x32x3 images.
//
// The network is folded onto four processing elements by quantized bit-width:
// PE 0 (48 groups of 3x3 8x8-bit multipliers) runs layer 1, PE 1 (128 groups,
// 7x6-bit) runs layers 2-14, PE 2 (128 groups, 8x7-bit) runs layers 15-21 and
// PE 3 (10 MACs, 8x8-bit) runs the fully connected layer 22. The instruction
// FSM steps through the compiled program; the layer controller executes each
// instruction, streaming the source feature maps from a feature RAM through
// one register buffer per input-channel lane into the selected PE and writing
// the quantized results into the other feature RAM. Two feature RAMs, each
// made of one true dual-port bank per channel lane, alternate as source and
// destination from layer to layer.
//
// Operation: pulse start with img_base set. The AXI4 loader reads the image
// (3 planes of 32x32 signed 8-bit pixels, row-major) from off-chip memory
// into feature RAM 0, then the program runs. done pulses when the 10 logits
// (full-precision FC accumulators) are valid; they hold until the next run.
//
// Own choices where the description is silent: the residual shortcuts of
// ResNet20 are not modelled (the 21 convolution layers run as a chain),
// average pooling precedes the FC layer, feature values are stored in 8-bit
// slots, stand-in weights come from the package's generator functions.
module mp_accel_top #(
  parameter int unsigned LANES  = mp_pkg::MAX_CH,  // channel lanes (banks, buffers)
  parameter int unsigned DEPTH  = 1024,            // words per feature RAM bank
  parameter int unsigned ADDR_W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [ADDR_W-1:0]      img_base,
  // AXI4 read master to off-chip memory
  output logic [ADDR_W-1:0]      m_araddr,
  output logic [7:0]             m_arlen,
  output logic [2:0]             m_arsize,
  output logic [1:0]             m_arburst,
  output logic                   m_arvalid,
  input  logic                   m_arready,
  input  logic [15:0]            m_rdata,
  input  logic [1:0]             m_rresp,
  input  logic                   m_rlast,
  input  logic                   m_rvalid,
  output logic                   m_rready,
  // results
  output logic                   busy,
  output logic                   done,
  output logic signed [mp_pkg::FC_OUT-1:0][23:0] logits
);
  import mp_pkg::*;

  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned TAG_W = 16;
  localparam int unsigned SMAX  = 128;

  // ---------------- image load and program sequencing ----------------
  logic ld_we, ld_busy, ld_done;
  logic [1:0] ld_ch;
  logic [4:0] ld_y, ld_x;
  logic [1:0][7:0] ld_data;

  axi_image_loader #(.C(IMG_C), .H(IMG_H), .W(IMG_W), .ADDR_W(ADDR_W)) u_loader (
    .clk, .rst_n, .start, .base(img_base),
    .araddr(m_araddr), .arlen(m_arlen), .arsize(m_arsize), .arburst(m_arburst),
    .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .pix_we(ld_we), .pix_ch(ld_ch), .pix_y(ld_y), .pix_x(ld_x), .pix_data(ld_data),
    .busy(ld_busy), .done(ld_done));

  instr_t ins;
  logic   ins_valid, ins_done, fsm_busy, fsm_done;
  logic [$clog2(program_len() + 1)-1:0] pc;

  instr_fsm u_fsm (
    .clk, .rst_n, .start(ld_done), .instr(ins), .instr_valid(ins_valid),
    .instr_done(ins_done), .busy(fsm_busy), .all_done(fsm_done), .pc);

  // ---------------- layer controller ----------------
  logic [1:0] cfg_pe;
  logic [2:0] cfg_level;
  logic [4:0] cfg_shift;
  logic [3:0] cfg_nbits;
  logic [7:0] wgt_addr;
  logic [5:0] ch_start;
  logic [6:0] n_out, cfg_cout;
  logic       src_sel, dst_sel;
  logic       rd_en;
  logic [AW-1:0] rd_addr_a, rd_addr_b;
  logic [LANES-1:0][15:0] src_rdata_a, src_rdata_b;
  logic       rb_clr, rb_wr_en, rb_win_take;
  logic [3:0] rb_zero_mask;
  logic [LANES-1:0][5:0] rb_row_free;
  logic [LANES-1:0]      rb_win_valid;
  logic [LANES-1:0][4:0] rb_win_idx;
  logic [LANES-1:0][KK-1:0][DW-1:0] rb_win;
  logic       pe_valid;
  logic [TAG_W-1:0] pe_tag;
  logic       pe_out_valid;
  logic [TAG_W-1:0] pe_out_tag;
  logic       wb_en, wb_half;
  logic [AW-1:0] wb_addr;
  logic       fc_start, fc_valid, fc_done;
  logic signed [DW-1:0] fc_x;
  logic [5:0] fc_addr;

  layer_ctrl #(.LANES(LANES), .DW(DW), .AW(AW), .TAG_W(TAG_W)) u_ctrl (
    .clk, .rst_n, .new_run(ld_done), .instr(ins), .instr_valid(ins_valid), .instr_done(ins_done),
    .cfg_pe, .cfg_level, .cfg_shift, .cfg_nbits, .wgt_addr, .ch_start, .n_out, .cfg_cout,
    .src_sel, .dst_sel, .rd_en, .rd_addr_a, .rd_addr_b, .src_rdata_a,
    .rb_clr, .rb_wr_en, .rb_zero_mask, .rb_row_free(rb_row_free[0]),
    .rb_win_valid(rb_win_valid[0]), .rb_win_idx(rb_win_idx[0]), .rb_win_take,
    .pe_valid, .pe_tag, .pe_out_valid, .pe_out_tag,
    .wb_en, .wb_addr, .wb_half,
    .fc_start, .fc_valid, .fc_x, .fc_addr, .fc_done);

  // ---------------- PE outputs, selected by the running instruction ----------------
  logic [2:0]                        pe_ov;
  logic [2:0][TAG_W-1:0]             pe_ot;
  logic [2:0][SMAX-1:0][DW-1:0]      pe_o;
  logic [SMAX-1:0][DW-1:0]           res;

  always_comb begin
    pe_out_valid = pe_ov[cfg_pe[1] ? 2 : 32'(cfg_pe)];
    pe_out_tag   = pe_ot[cfg_pe[1] ? 2 : 32'(cfg_pe)];
    res          = pe_o[cfg_pe[1] ? 2 : 32'(cfg_pe)];
  end

  // ---------------- feature RAMs and register buffers ----------------
  for (genvar b = 0; b < int'(LANES); b++) begin : g_lane
    logic [1:0][15:0] a_rd, b_rd;
    logic [3:0][DW-1:0] wr_vals;
    logic             wb_here;
    logic [DW-1:0]    wb_val;
    int               j;

    always_comb begin
      j       = b - int'(ch_start);
      wb_here = wb_en && (j >= 0) && (j < int'(n_out)) && (b < int'(cfg_cout));
      wb_val  = (j >= 0 && j < int'(SMAX)) ? res[j] : '0;
    end

    for (genvar r = 0; r < 2; r++) begin : g_ram
      logic          a_en, b_en;
      logic [1:0]    a_we, b_we;
      logic [AW-1:0] a_addr, b_addr;
      logic [15:0]   a_wd, b_wd;
      always_comb begin
        int p0;
        p0 = (int'(ld_y) + 1) * (IMG_W + 2) + int'(ld_x) + 1;
        a_en = 1'b0; a_we = '0; a_addr = '0; a_wd = '0;
        b_en = 1'b0; b_we = '0; b_addr = '0; b_wd = '0;
        if (r == 0 && ld_we && int'(ld_ch) == b) begin
          // pixel x at the odd padded position p0, pixel x+1 right after it
          a_en = 1'b1; a_we = 2'b10; a_addr = AW'(p0 >> 1);       a_wd = {ld_data[0], 8'h00};
          b_en = 1'b1; b_we = 2'b01; b_addr = AW'((p0 + 1) >> 1); b_wd = {8'h00, ld_data[1]};
        end else if (rd_en && src_sel == r[0]) begin
          a_en = 1'b1; a_addr = rd_addr_a;
          b_en = 1'b1; b_addr = rd_addr_b;
        end else if (wb_here && dst_sel == r[0]) begin
          a_en = 1'b1; a_addr = wb_addr; a_wd = {wb_val, wb_val};
          a_we = wb_half ? 2'b10 : 2'b01;
        end
      end
      feature_ram #(.DW(DW), .DEPTH(DEPTH)) u_ram (
        .clk,
        .a_en, .a_we, .a_addr, .a_wdata(a_wd), .a_rdata(a_rd[r]),
        .b_en, .b_we, .b_addr, .b_wdata(b_wd), .b_rdata(b_rd[r]));
    end

    assign src_rdata_a[b] = a_rd[src_sel];
    assign src_rdata_b[b] = b_rd[src_sel];

    always_comb begin
      wr_vals[0] = rb_zero_mask[0] ? '0 : src_rdata_a[b][DW-1:0];
      wr_vals[1] = rb_zero_mask[1] ? '0 : src_rdata_a[b][2*DW-1:DW];
      wr_vals[2] = rb_zero_mask[2] ? '0 : src_rdata_b[b][DW-1:0];
      wr_vals[3] = rb_zero_mask[3] ? '0 : src_rdata_b[b][2*DW-1:DW];
    end

    register_buffer #(.ROWS(6), .COLS(8), .K(3), .WR(4), .DW(DW)) u_rb (
      .clk, .rst_n, .clr(rb_clr), .wr_en(rb_wr_en), .wr_data(wr_vals),
      .row_free(rb_row_free[b]), .win_valid(rb_win_valid[b]), .win_idx(rb_win_idx[b]),
      .win(rb_win[b]), .win_take(rb_win_take));
  end

  // ---------------- convolution PEs with their ROM arrays ----------------
  for (genvar p = 0; p < 3; p++) begin : g_pe
    localparam int unsigned S  = PE_S[p];
    localparam int unsigned M  = PE_M[p];
    localparam int unsigned N  = PE_N[p];
    localparam int unsigned RD = rom_depth(p);
    localparam int unsigned RA = (RD <= 1) ? 1 : $clog2(RD);
    logic [S-1:0][KK-1:0][N-1:0] win;
    logic [S-1:0][KK-1:0][M-1:0] wgt;
    logic signed [S-1:0][15:0]   bias;
    logic signed [S-1:0][DW-1:0] o;

    for (genvar g = 0; g < int'(S); g++) begin : g_grp
      always_comb begin
        int lane;
        lane = g & ((1 << cfg_level) - 1);
        for (int t = 0; t < int'(KK); t++)
          win[g][t] = (lane < int'(LANES)) ? N'(rb_win[lane][t]) : '0;
      end
      weight_rom #(.PE_IDX(p), .GROUP(g), .K(3), .M(M), .DEPTH(RD)) u_wrom (
        .clk, .addr(RA'(wgt_addr)), .data(wgt[g]));
    end

    bias_rom #(.PE_IDX(p), .S(S), .BIAS_W(16), .DEPTH(RD)) u_brom (
      .clk, .addr(RA'(wgt_addr)), .data(bias));

    conv_pe #(.S(S), .M(M), .N(N), .K(3), .OUT_W(DW), .BIAS_W(16), .TAG_W(TAG_W)) u_pe (
      .clk, .rst_n,
      .in_valid(pe_valid && cfg_pe == 2'(p)), .in_tag(pe_tag),
      .win, .wgt, .bias,
      .level(($clog2($clog2(S) + 1))'(cfg_level)), .shift(cfg_shift), .nbits(cfg_nbits),
      .out_valid(pe_ov[p]), .out_tag(pe_ot[p]), .out(o));

    always_comb begin
      pe_o[p] = '0;
      for (int i = 0; i < int'(S); i++) pe_o[p][i] = o[i];
    end
  end

  // ---------------- fully connected PE ----------------
  logic [FC_OUT-1:0][7:0] fc_w;
  logic fc_busy_q;

  fc_weight_rom #(.NIN(FC_IN), .NOUT(FC_OUT), .WB(8)) u_fcrom (
    .clk, .addr(fc_addr), .data(fc_w));

  fc_pe #(.NIN(FC_IN), .NOUT(FC_OUT), .WB(8), .XB(DW), .ACC_W(24)) u_fc (
    .clk, .rst_n, .start(fc_start), .in_valid(fc_valid), .x(fc_x), .w(fc_w),
    .acc(logits), .done(fc_done));

  // ---------------- status ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done      <= 1'b0;
      fc_busy_q <= 1'b0;
    end else begin
      done      <= fsm_done;
      fc_busy_q <= ld_busy || fsm_busy;
    end
  end
  assign busy = fc_busy_q || ld_busy || fsm_busy;

  // The controller never reads and writes the same feature RAM.
  always_ff @(posedge clk)
    if (rst_n && rd_en && wb_en) assert (src_sel != dst_sel) else $error("source and result RAM coincide");
endmodule

// layer_ctrl: control module that carries out one instruction.
//
// Convolution instructions (PE 0..2): the input feature map of every input
// channel is swept in tiles of 6 x 8 padded pixels that give 4 x 6 stride-1
// output pixels. For each tile the controller reads 12 times from the source
// feature RAM, both ports at once on adjacent words (four pixels per read),
// and writes the values into the register buffers of all channel lanes in
// parallel; it issues a read only when the buffer row it will land in is
// free, so the buffers' read/write overlap sets the pace. Pixels of the
// zero-padding border (and past the map's edge) are masked to zero. Each
// cycle a full 3x3 window set is available it is passed to the PE with a tag
// (tile row, tile column, window index). Results coming back from the PE are
// mapped to output coordinates; stride-2 layers keep the even positions;
// in-range pixels are written to the result RAM, one value per output lane.
//
// Feature maps are stored with a one-pixel border: pixel (y, x) of an H x H
// map sits at padded position (y+1)*(H+2) + (x+1), two pixels per word.
//
// Fully connected instruction (PE 3): each of the 64 channels of the final
// 8x8 map is averaged (sum, then arithmetic shift by log2 of the pixel count)
// and the 64 averages are streamed, one per cycle, into the FC PE together
// with their weight columns.
//
// Per instruction it also selects the PE, the layer's tree level, shift and
// output width, and the weight ROM word (weight_base(layer) + WEIGHT_ID). The
// source RAM of a layer is the result RAM of the layer before (the input image
// RAM for the first layer); it changes when the layer number changes, which is
// how shared PEs switch from one folded layer to the next. instr_done pulses
// when all results are written.
//
// Own choices: tile order (row-major), tag layout, border storage, average
// pooling before the FC layer, a fixed six-cycle drain after the last window.
module layer_ctrl #(
  parameter int unsigned LANES = 64,
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = 10,
  parameter int unsigned TAG_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       new_run,
  input  mp_pkg::instr_t             instr,
  input  logic                       instr_valid,
  output logic                       instr_done,
  // configuration of the running instruction
  output logic [1:0]                 cfg_pe,
  output logic [2:0]                 cfg_level,
  output logic [4:0]                 cfg_shift,
  output logic [3:0]                 cfg_nbits,
  output logic [7:0]                 wgt_addr,
  output logic [5:0]                 ch_start,
  output logic [6:0]                 n_out,
  output logic [6:0]                 cfg_cout,
  output logic                       src_sel,
  output logic                       dst_sel,
  // source feature RAM reads
  output logic                       rd_en,
  output logic [AW-1:0]              rd_addr_a,
  output logic [AW-1:0]              rd_addr_b,
  input  logic [LANES-1:0][2*DW-1:0] src_rdata_a,
  // register buffers (all lanes move together; status from lane 0)
  output logic                       rb_clr,
  output logic                       rb_wr_en,
  output logic [3:0]                 rb_zero_mask,
  input  logic [5:0]                 rb_row_free,
  input  logic                       rb_win_valid,
  input  logic [4:0]                 rb_win_idx,
  output logic                       rb_win_take,
  // PE pipeline
  output logic                       pe_valid,
  output logic [TAG_W-1:0]           pe_tag,
  input  logic                       pe_out_valid,
  input  logic [TAG_W-1:0]           pe_out_tag,
  // result write-back (one value per output lane)
  output logic                       wb_en,
  output logic [AW-1:0]              wb_addr,
  output logic                       wb_half,
  // fully connected PE
  output logic                       fc_start,
  output logic                       fc_valid,
  output logic signed [DW-1:0]       fc_x,
  output logic [5:0]                 fc_addr,
  input  logic                       fc_done
);
  import mp_pkg::*;

  typedef enum logic [2:0] {C_IDLE, C_CONV, C_DRAIN, C_POOL, C_POOL_END,
                            C_FC_FEED, C_FC_WAIT} state_t;
  state_t     state;
  layer_cfg_t cfg;
  instr_t     ins;
  logic [LAYER_W-1:0] cur_layer;
  logic       have_layer;
  logic       last_dst;

  // tiling
  logic [3:0] tiles;                 // tiles per column direction (rows / 4)
  logic [3:0] tiles_x;               // tiles per row direction (cols / 6)
  logic [3:0] is_ty, is_tx, cs_ty, cs_tx;
  logic [3:0] is_k;
  logic       is_done, cs_done;
  logic [2:0] drain;
  logic       issue;
  logic [3:0] mask_c;
  logic [AW-1:0] word_c;
  logic          half_c;

  // pooling / FC
  logic [5:0] p_y, p_x;
  logic       pool_v_q, pool_h_q, pool_last;
  logic signed [LANES-1:0][15:0] pool_acc;
  logic signed [LANES-1:0][DW-1:0] pooled;
  logic [6:0] fc_i;
  logic [4:0] pool_shift;

  function automatic logic [4:0] log2_pix(input logic [5:0] h);
    return (h == 32) ? 5'd10 : (h == 16) ? 5'd8 : (h == 8) ? 5'd6 : 5'd4;
  endfunction

  // --------------- issue side: RAM reads into the register buffers ---------------
  always_comb begin
    int py, pxb, wp, pix;
    wp   = int'(cfg.hin) + 2;
    py   = int'(is_ty) * 4 + int'(is_k >> 1);
    pxb  = int'(is_tx) * 6 + int'(is_k[0]) * 4;
    pix  = py * wp + pxb;
    word_c = AW'(pix >> 1);
    for (int v = 0; v < 4; v++)
      mask_c[v] = (py == 0) || (py > int'(cfg.hin)) || (pxb + v == 0) ||
                  (pxb + v > int'(cfg.hin));
    issue = (state == C_CONV) && !is_done && rb_row_free[is_k >> 1];
    if (state == C_POOL) begin
      pix    = (int'(p_y) + 1) * wp + int'(p_x) + 1;
      word_c = AW'(pix >> 1);
    end
    half_c = pix[0];
  end

  assign rd_en       = issue || (state == C_POOL);
  assign rd_addr_a   = word_c;
  assign rd_addr_b   = word_c + 1'b1;
  assign rb_win_take = (state == C_CONV) && !cs_done && rb_win_valid;
  assign pe_valid    = rb_win_take;
  assign pe_tag      = TAG_W'({cs_ty, cs_tx, rb_win_idx});

  // --------------- write-back of PE results ---------------
  always_comb begin
    int r, c, y, x, yo, xo, wpo, pix;
    logic [3:0] t_ty, t_tx;
    logic [4:0] t_w;
    {t_ty, t_tx, t_w} = pe_out_tag[12:0];
    r  = int'(t_w) / 6;
    c  = int'(t_w) % 6;
    y  = int'(t_ty) * 4 + r;
    x  = int'(t_tx) * 6 + c;
    yo = cfg.stride2 ? (y >> 1) : y;
    xo = cfg.stride2 ? (x >> 1) : x;
    wpo = (cfg.stride2 ? int'(cfg.hin) / 2 : int'(cfg.hin)) + 2;
    pix = (yo + 1) * wpo + xo + 1;
    wb_en   = pe_out_valid && (y < int'(cfg.hin)) && (x < int'(cfg.hin)) &&
              (!cfg.stride2 || (y % 2 == 0 && x % 2 == 0));
    wb_addr = AW'(pix >> 1);
    wb_half = pix[0];
  end

  // --------------- sequencing ---------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      cfg <= '0; ins <= '0;
      cur_layer <= '0; have_layer <= 1'b0; last_dst <= 1'b0;
      src_sel <= 1'b0; dst_sel <= 1'b0;
      tiles <= '0; tiles_x <= '0;
      is_ty <= '0; is_tx <= '0; is_k <= '0; is_done <= 1'b0;
      cs_ty <= '0; cs_tx <= '0; cs_done <= 1'b0;
      drain <= '0;
      rb_clr <= 1'b0; rb_wr_en <= 1'b0; rb_zero_mask <= '0;
      wgt_addr <= '0;
      instr_done <= 1'b0;
      p_y <= '0; p_x <= '0; pool_v_q <= 1'b0; pool_h_q <= 1'b0; pool_last <= 1'b0;
      pool_acc <= '0; pooled <= '0; pool_shift <= '0;
      fc_i <= '0; fc_start <= 1'b0; fc_valid <= 1'b0; fc_x <= '0;
    end else begin
      instr_done <= 1'b0;
      rb_clr     <= 1'b0;
      fc_start   <= 1'b0;
      fc_valid   <= 1'b0;
      rb_wr_en     <= issue;
      rb_zero_mask <= mask_c;
      if (new_run) begin
        have_layer <= 1'b0;
        last_dst   <= 1'b0;
      end
      unique case (state)
        C_IDLE: if (instr_valid) begin
          layer_cfg_t c;
          c = layer_cfg(32'(instr.layer_id));
          ins <= instr;
          cfg <= c;
          if (!have_layer || instr.layer_id != cur_layer) src_sel <= last_dst;
          cur_layer  <= instr.layer_id;
          have_layer <= 1'b1;
          dst_sel  <= instr.result_id[0];
          wgt_addr <= 8'(weight_base(32'(instr.layer_id)) + 32'(instr.weight_id));
          tiles    <= 4'((32'(c.hin) + 3) / 4);
          tiles_x  <= 4'((32'(c.hin) + 5) / 6);
          is_ty <= '0; is_tx <= '0; is_k <= '0; is_done <= 1'b0;
          cs_ty <= '0; cs_tx <= '0; cs_done <= 1'b0;
          p_y <= '0; p_x <= '0; pool_acc <= '0; fc_i <= '0;
          pool_shift <= log2_pix(c.hin);
          rb_clr <= 1'b1;
          state  <= (instr.pe_id == 2'd3) ? C_POOL : C_CONV;
        end
        C_CONV: begin
          if (issue) begin
            if (is_k == 4'd11) begin
              is_k <= '0;
              if (is_tx == tiles_x - 1'b1) begin
                is_tx <= '0;
                if (is_ty == tiles - 1'b1) is_done <= 1'b1;
                else is_ty <= is_ty + 1'b1;
              end else is_tx <= is_tx + 1'b1;
            end else is_k <= is_k + 1'b1;
          end
          if (rb_win_take && rb_win_idx == 5'd23) begin
            if (cs_tx == tiles_x - 1'b1) begin
              cs_tx <= '0;
              if (cs_ty == tiles - 1'b1) begin
                cs_done <= 1'b1;
                drain   <= '0;
                state   <= C_DRAIN;
              end else cs_ty <= cs_ty + 1'b1;
            end else cs_tx <= cs_tx + 1'b1;
          end
        end
        C_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd5) begin
            instr_done <= 1'b1;
            last_dst   <= ins.result_id[0];
            state      <= C_IDLE;
          end
        end
        C_POOL: begin
          if (p_x == 6'(cfg.hin - 1)) begin
            p_x <= '0;
            if (p_y == 6'(cfg.hin - 1)) state <= C_POOL_END;
            else p_y <= p_y + 1'b1;
          end else p_x <= p_x + 1'b1;
        end
        C_POOL_END: state <= C_FC_FEED;
        C_FC_FEED: begin
          if (fc_i == 7'd0) fc_start <= 1'b1;
          if (fc_i != 7'd0) begin
            fc_valid <= 1'b1;
            fc_x     <= pooled[fc_i - 1'b1];
          end
          if (32'(fc_i) == FC_IN) state <= C_FC_WAIT;
          fc_i <= fc_i + 1'b1;
        end
        C_FC_WAIT: if (fc_done) begin
          instr_done <= 1'b1;
          last_dst   <= ins.result_id[0];
          state      <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase

      // pooling accumulation, one cycle after each read
      pool_v_q  <= (state == C_POOL);
      pool_h_q  <= half_c;
      pool_last <= (state == C_POOL_END);
      if (pool_v_q)
        for (int b = 0; b < int'(LANES); b++)
          pool_acc[b] <= pool_acc[b] + 16'($signed(pool_h_q ? src_rdata_a[b][2*DW-1:DW]
                                                            : src_rdata_a[b][DW-1:0]));
      if (pool_last)
        for (int b = 0; b < int'(LANES); b++)
          pooled[b] <= DW'($signed(pool_acc[b]) >>> pool_shift);
    end
  end

  assign fc_addr   = 6'(fc_i - 1'b1);
  assign cfg_pe    = ins.pe_id;
  assign cfg_level = cfg.log2g;
  assign cfg_shift = cfg.shift;
  assign cfg_nbits = cfg.abits_out;
  assign ch_start  = ins.channel_id;
  assign n_out     = 7'(outs_per_pass(32'(ins.layer_id)));
  assign cfg_cout  = cfg.cout;
endmodule

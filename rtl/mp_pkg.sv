// mp_pkg: types, constants and tables shared by the mixed-precision ResNet20
// accelerator.
//
// The instruction word follows the segment layout of the accelerator's
// instruction format: LAYER_ID (5 b), CHANNEL_ID (6 b), PE_ID (2 b),
// WEIGHT_ID (6 b), RESULT_ID (6 b) and STRIDE (1 b), 26 bits in all; each
// segment is ceil(log2(number of values it names)) wide.
//
// The per-layer table encodes the 21 convolution layers and the fully
// connected layer of ResNet20 on 32x32x3 CIFAR-10 images, with the bit-width
// policy found by the search: layer 1 uses 8-bit weights and activations,
// layers 2-14 7-bit weights and 6-bit activations, layers 15-21 8-bit weights
// and 7-bit activations, layer 22 8-bit weights and activations. Weights keep
// 2 integer bits and activations 4 integer bits, so a value with n bits has
// n-l-1 fraction bits. The right shift of a layer is therefore
// (wbits-3) + (abits_in-5) - (abits_out-5).
//
// Own choices of this design: the layers run as a plain chain (the residual
// additions of ResNet20 are not part of the hardware), the PE group size G is
// the input-channel count rounded up to a power of two (layer 1: 3 -> 4), and
// the weight, bias and image contents are deterministic stand-ins generated by
// the functions below, since trained values are not available. Testbenches
// use the same functions to build their reference models.
package mp_pkg;

  // ---------------- instruction format ----------------
  localparam int unsigned LAYER_W  = 5;
  localparam int unsigned CHAN_W   = 6;
  localparam int unsigned PEID_W   = 2;
  localparam int unsigned WID_W    = 6;
  localparam int unsigned RESID_W  = 6;
  localparam int unsigned INSTR_W  = LAYER_W + CHAN_W + PEID_W + WID_W + RESID_W + 1;

  typedef struct packed {
    logic [LAYER_W-1:0] layer_id;   // 0-based layer index (layer 1 -> 0)
    logic [CHAN_W-1:0]  channel_id; // first output channel of this pass
    logic [PEID_W-1:0]  pe_id;      // 0..2 convolution PEs, 3 fully connected PE
    logic [WID_W-1:0]   weight_id;  // pass index inside the layer's weight block
    logic [RESID_W-1:0] result_id;  // feature RAM that receives the results
    logic               stride;     // 0: stride 1, 1: stride 2
  } instr_t;

  // ---------------- network geometry ----------------
  localparam int unsigned NUM_LAYERS   = 22;
  localparam int unsigned NUM_CONV     = 21;
  localparam int unsigned KK           = 9;     // 3x3 kernels
  localparam int unsigned DW           = 8;     // feature storage slot width
  localparam int unsigned IMG_C        = 3;
  localparam int unsigned IMG_H        = 32;
  localparam int unsigned IMG_W        = 32;
  localparam int unsigned MAX_CH       = 64;
  localparam int unsigned FC_IN        = 64;
  localparam int unsigned FC_OUT       = 10;
  localparam int unsigned PE_S [3]     = '{48, 128, 128};
  localparam int unsigned PE_M [3]     = '{8, 7, 8};    // weight bits
  localparam int unsigned PE_N [3]     = '{8, 6, 7};    // feature bits

  typedef struct packed {
    logic [6:0] cin;
    logic [6:0] cout;
    logic [5:0] hin;        // input height = width
    logic       stride2;
    logic [1:0] pe;
    logic [3:0] wbits;
    logic [3:0] abits_in;
    logic [3:0] abits_out;
    logic [4:0] shift;
    logic [2:0] log2g;      // group size G = 2**log2g
  } layer_cfg_t;

  function automatic layer_cfg_t layer_cfg(input int unsigned l);
    layer_cfg_t c;
    c = '0;
    if (l == 0) begin
      c.cin = 3;  c.cout = 16; c.hin = 32; c.stride2 = 0; c.pe = 0;
      c.wbits = 8; c.abits_in = 8; c.abits_out = 6; c.log2g = 2;
    end else if (l <= 13) begin
      c.cin  = (l <= 7) ? 7'd16 : 7'd32;
      c.cout = (l <= 6) ? 7'd16 : 7'd32;
      c.hin  = (l <= 7) ? 6'd32 : 6'd16;
      c.stride2 = (l == 7);
      c.pe = 1; c.wbits = 7; c.abits_in = 6;
      c.abits_out = (l == 13) ? 4'd7 : 4'd6;
      c.log2g = (l <= 7) ? 3'd4 : 3'd5;
    end else if (l <= 20) begin
      c.cin  = (l == 14) ? 7'd32 : 7'd64;
      c.cout = 64;
      c.hin  = (l == 14) ? 6'd16 : 6'd8;
      c.stride2 = (l == 14);
      c.pe = 2; c.wbits = 8; c.abits_in = 7;
      c.abits_out = (l == 20) ? 4'd8 : 4'd7;
      c.log2g = (l == 14) ? 3'd5 : 3'd6;
    end else begin
      c.cin = 64; c.cout = 10; c.hin = 8; c.pe = 3;
      c.wbits = 8; c.abits_in = 8; c.abits_out = 8; c.log2g = 0;
    end
    c.shift = 5'((c.wbits - 3) + (c.abits_in - 5) - (c.abits_out - 5));
    return c;
  endfunction

  // Output channels computed per pass of a convolution layer.
  function automatic int unsigned outs_per_pass(input int unsigned l);
    layer_cfg_t c = layer_cfg(l);
    return PE_S[c.pe] >> c.log2g;
  endfunction

  function automatic int unsigned passes(input int unsigned l);
    layer_cfg_t c = layer_cfg(l);
    if (c.pe == 3) return 1;
    return (int'(c.cout) + outs_per_pass(l) - 1) / outs_per_pass(l);
  endfunction

  // First weight ROM word of layer l inside its PE's ROM array.
  function automatic int unsigned weight_base(input int unsigned l);
    int unsigned b = 0;
    layer_cfg_t c = layer_cfg(l);
    for (int unsigned k = 0; k < l; k++)
      if (layer_cfg(k).pe == c.pe) b += passes(k);
    return b;
  endfunction

  function automatic int unsigned rom_depth(input int unsigned pe);
    int unsigned d = 0;
    for (int unsigned k = 0; k < NUM_CONV; k++)
      if (layer_cfg(k).pe == pe) d += passes(k);
    return d;
  endfunction

  // Number of instructions of the ResNet20 program.
  function automatic int unsigned program_len();
    int unsigned n = 0;
    for (int unsigned k = 0; k < NUM_LAYERS; k++) n += passes(k);
    return n;
  endfunction

  // Instruction n of the program. Results alternate between feature RAMs 1
  // and 0; the input image sits in RAM 0.
  function automatic instr_t program_instr(input int unsigned n);
    instr_t ins = '0;
    int unsigned k = n;
    for (int unsigned l = 0; l < NUM_LAYERS; l++) begin
      if (k < passes(l)) begin
        ins.layer_id   = LAYER_W'(l);
        ins.channel_id = CHAN_W'(k * outs_per_pass(l));
        ins.pe_id      = layer_cfg(l).pe;
        ins.weight_id  = WID_W'(k);
        ins.result_id  = RESID_W'((l % 2 == 0) ? 1 : 0);
        ins.stride     = layer_cfg(l).stride2;
        return ins;
      end
      k -= passes(l);
    end
    return ins;
  endfunction

  // ---------------- stand-in parameter contents ----------------
  function automatic logic [31:0] mix(input logic [31:0] a);
    logic [31:0] x = a;
    x = x ^ (x >> 16);
    x = x * 32'h045d9f3b;
    x = x ^ (x >> 16);
    x = x * 32'h045d9f3b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Signed weight of layer l, output channel o, input channel i, tap t, drawn
  // from [-3, 3] (small, like trained low-bit weights, so that outputs spread
  // over the activation range); zero outside the layer's channels.
  function automatic int weight_val(input int unsigned l, input int unsigned o,
                                    input int unsigned i, input int unsigned t);
    layer_cfg_t c = layer_cfg(l);
    if (o >= c.cout || i >= c.cin) return 0;
    return int'(mix((l << 24) ^ (o << 16) ^ (i << 8) ^ t) % 7) - 3;
  endfunction

  // Folded bias b' of layer l, output channel o, at product scale.
  function automatic int bias_val(input int unsigned l, input int unsigned o);
    layer_cfg_t c = layer_cfg(l);
    int unsigned span = 1 << (c.shift + 2);
    if (o >= c.cout) return 0;
    return int'(mix(32'h00b1a500 ^ (l << 8) ^ o) % span) - int'(span / 4);
  endfunction

  // Fully connected weight for logit k and input channel i (8-bit signed).
  function automatic int fc_weight(input int unsigned k, input int unsigned i);
    return int'(mix(32'h0fc00000 ^ (k << 8) ^ i) % 256) - 128;
  endfunction

  // Signed 8-bit input pixel of channel ch, row y, column x.
  function automatic int image_pixel(input int unsigned seed, input int unsigned ch,
                                     input int unsigned y, input int unsigned x);
    return int'(mix(seed ^ (ch << 16) ^ (y << 8) ^ x) % 256) - 128;
  endfunction

  // Round half up on the first dropped bit, then clamp to a signed n-bit range.
  function automatic int round_clamp_ref(input longint x, input int unsigned sh,
                                         input int unsigned n);
    longint y, qmax, qmin;
    y = (sh == 0) ? x : ((x >>> sh) + ((x >>> (sh - 1)) & 1));
    qmax = (longint'(1) << (n - 1)) - 1;
    qmin = -(longint'(1) << (n - 1));
    if (y > qmax) y = qmax;
    if (y < qmin) y = qmin;
    return int'(y);
  endfunction

endpackage

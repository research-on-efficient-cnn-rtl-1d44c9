// conv_pe: mixed-precision convolution processing element.
//
// S conv groups (each K*K multipliers of one M x N type plus a window adder)
// compute S window sums in parallel. A channel adder tree reduces groups that
// belong to the same output pixel, and a multiplexer picks the tree level set
// by the current layer, so layers with different input-channel counts share
// the PE. Each selected sum gets the folded bias b' added, passes ReLU, and is
// rounded and clamped to the next layer's bit-width.
//
// Pipeline (one new window set per cycle, latency 4, as in the four-stage
// PE pipeline): stage 1 multiplication (registered window sums), stage 2
// channel adder tree and level multiplexer, stage 3 bias and activation,
// stage 4 round and clamp. The configuration inputs (bias, level, shift, nbits) must
// stay steady while a layer is in flight. A TAG travels with each set so the
// caller can tell where the results belong.
//
// Own choices: the bias add sits in the activation stage; the window adder is
// counted in the multiplication stage.
module conv_pe #(
  parameter int unsigned S      = 128,  // conv groups (multipliers = S*K*K)
  parameter int unsigned M      = 7,    // weight bits
  parameter int unsigned N      = 6,    // feature bits
  parameter int unsigned K      = 3,
  parameter int unsigned OUT_W  = 8,    // stored activation slot
  parameter int unsigned BIAS_W = 16,
  parameter int unsigned TAG_W  = 16,
  localparam int unsigned LV    = $clog2(S),
  localparam int unsigned SEL_W = $clog2(LV + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [TAG_W-1:0]                   in_tag,
  input  logic [S-1:0][K*K-1:0][N-1:0]       win,    // one window per group
  input  logic [S-1:0][K*K-1:0][M-1:0]       wgt,    // one kernel per group
  input  logic signed [S-1:0][BIAS_W-1:0]    bias,   // per output lane
  input  logic [SEL_W-1:0]                   level,  // adder tree tap
  input  logic [4:0]                         shift,
  input  logic [$clog2(OUT_W+1)-1:0]         nbits,
  output logic                               out_valid,
  output logic [TAG_W-1:0]                   out_tag,
  output logic signed [S-1:0][OUT_W-1:0]     out
);
  localparam int unsigned WS_W = M + N + $clog2(K*K);
  localparam int unsigned AT_W = WS_W + LV;
  localparam int unsigned AC_W = AT_W + 1;

  logic signed [S-1:0][WS_W-1:0] ws, ws_q;
  logic signed [S-1:0][AT_W-1:0] at, at_q;
  logic signed [S-1:0][AC_W-1:0] act, act_q;
  logic signed [S-1:0][OUT_W-1:0] qo;
  logic [3:0]              v_q;
  logic [3:0][TAG_W-1:0]   tag_q;

  for (genvar g = 0; g < S; g++) begin : g_conv
    conv_kernel #(.K(K), .M(M), .N(N)) u_conv (.w(wgt[g]), .a(win[g]), .sum(ws[g]));
  end

  channel_adder_tree #(.S(S), .IN_W(WS_W)) u_tree (.x(ws_q), .level(level), .y(at));

  for (genvar g = 0; g < S; g++) begin : g_post
    logic signed [AC_W-1:0] biased;
    assign biased = AC_W'($signed(at_q[g])) + AC_W'($signed(bias[g]));
    relu_unit #(.W(AC_W)) u_relu (.x(biased), .y(act[g]));
    round_clamp #(.IN_W(AC_W), .OUT_W(OUT_W)) u_rc (
      .x(act_q[g]), .shift(shift), .nbits(nbits), .y(qo[g]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= '0;
      tag_q <= '0;
      ws_q  <= '0;
      at_q  <= '0;
      act_q <= '0;
      out   <= '0;
    end else begin
      v_q   <= {v_q[2:0], in_valid};
      tag_q <= {tag_q[2:0], in_tag};
      ws_q  <= ws;
      at_q  <= at;
      act_q <= act;
      out   <= qo;
    end
  end

  assign out_valid = v_q[3];
  assign out_tag   = tag_q[3];
endmodule

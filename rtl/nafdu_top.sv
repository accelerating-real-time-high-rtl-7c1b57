// nafdu_top: streaming accelerator for noise-aware joint-bilateral depth upsampling (NAFDU).
//
// Input: one pixel pair per cycle in raster order, the 8-bit intensity of the colour image and
// the 8-bit depth of the same pixel from a depth map already resized to the colour resolution.
// Output: one filtered 8-bit depth per cycle, in raster order, with out_last on the final pixel
// of each frame. For every pixel p the filter computes, over the KW x KW neighbourhood,
//   w_q   = alpha(Delta) * g(|I_p - I_q|) + (1 - alpha(Delta)) * h(|D_p - D_q|)
//   out_p = sum(w_q * D_q) / sum(w_q)
// g and h are gaussian range terms on intensity and depth, Delta is max - min of the depth
// window and alpha a sigmoid of it. There is no spatial (distance) term: the weight is the
// blended range term only, as in the published accelerator's data path.
//
// Structure, following the published accelerator's data path: two kernel buffers (intensity, depth) built
// from line buffers, the g and h range units, the alpha unit, the blend
// alpha*(g-h) + (h << 8), the MAC and ACC reductions and the divider. scan_ctrl sequences the
// frame, flushes the last KW/2 rows through the buffers after the last input pixel and masks
// neighbours outside the image (this design's border handling: they get zero weight).
//
// Pipeline and timing: stage 0 is the window registers; then range/alpha (1), blend (1),
// MAC/ACC (1 + ceil(log2(KW^2))), divider (9). With KW = 13 that is 20 cycles from the window
// to out_depth. Every register advances on adv = !out_valid || out_ready, so a stalled output
// freezes the whole pipeline (and in_ready), and nothing is lost. A frame takes
// IMG_W*IMG_H + R*IMG_W + R cycles at full rate (R = (KW-1)/2): 3,158,022 for 2048x1536, KW=13,
// i.e. 10.5 ms at 300 MHz, the frame time reported for the published accelerator. Frames may follow each other
// directly. Reset is synchronous and active low.
module nafdu_top
  import nafdu_pkg::*;
#(
  parameter int KW         = 13,
  parameter int IMG_W      = 2048,
  parameter int IMG_H      = 1536,
  parameter int WGT_BITS   = 8,
  parameter int ALPHA_FRAC = 8,
  parameter int SIGMA_G    = 10,
  parameter int SIGMA_H    = 10,
  parameter int ALPHA_TAU  = 20,
  parameter int ALPHA_EPS_MILLI = 250
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  pix_pair_t in_pix,
  output logic      out_valid,
  input  logic      out_ready,
  output pix_t      out_depth,
  output logic      out_last
);
  localparam int W_BITS   = WGT_BITS + ALPHA_FRAC;
  localparam int LOGN     = $clog2(KW * KW);
  localparam int MAC_BITS = W_BITS + PIX_BITS + LOGN;
  localparam int ACC_BITS = W_BITS + LOGN;
  localparam int LAT_RED  = 1 + LOGN;             // mac_unit / acc_unit
  localparam int LAT_DIV  = PIX_BITS + 1;         // divider
  localparam int LAT      = 1 + 1 + LAT_RED + LAT_DIV;  // window -> out_depth

  logic adv, push, flushing, win_valid, win_last;
  logic [$clog2(IMG_W)-1:0] cx;
  logic [$clog2(IMG_H)-1:0] cy;
  logic mask [KW][KW];

  assign adv = !out_valid || out_ready;

  scan_ctrl #(.KW(KW), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_scan (
    .clk, .rst_n, .adv, .in_valid, .in_ready, .push, .flushing,
    .win_valid, .cx, .cy, .last(win_last), .mask
  );

  // Flush pushes carry zeros; the mask hides them.
  pix_t in_i, in_d;
  assign in_i = flushing ? '0 : in_pix.intensity;
  assign in_d = flushing ? '0 : in_pix.depth;

  pix_t win_i [KW][KW];
  pix_t win_d [KW][KW];

  kernel_buffer #(.KW(KW), .IMG_W(IMG_W)) u_kb_int (
    .clk, .rst_n, .push, .din(in_i), .win(win_i)
  );
  kernel_buffer #(.KW(KW), .IMG_W(IMG_W)) u_kb_dep (
    .clk, .rst_n, .push, .din(in_d), .win(win_d)
  );

  // Stage 1: range terms and alpha.
  logic [WGT_BITS-1:0] g [KW][KW];
  logic [WGT_BITS-1:0] h [KW][KW];
  logic [ALPHA_FRAC:0] alpha;
  pix_t                delta;

  range_weight #(.KW(KW), .WGT_BITS(WGT_BITS), .SIGMA(SIGMA_G)) u_g (
    .clk, .en(adv), .win(win_i), .mask, .w(g)
  );
  range_weight #(.KW(KW), .WGT_BITS(WGT_BITS), .SIGMA(SIGMA_H)) u_h (
    .clk, .en(adv), .win(win_d), .mask, .w(h)
  );
  alpha_unit #(.KW(KW), .ALPHA_FRAC(ALPHA_FRAC), .TAU(ALPHA_TAU), .EPS_MILLI(ALPHA_EPS_MILLI))
    u_alpha (.clk, .en(adv), .win(win_d), .mask, .alpha, .delta);

  // Depth window travels alongside to meet the blended weights.
  pix_t d1 [KW][KW];
  pix_t d2 [KW][KW];
  always_ff @(posedge clk) begin
    if (adv) begin
      d1 <= win_d;
      d2 <= d1;
    end
  end

  // Stage 2: blended weights.
  logic [W_BITS-1:0] w [KW][KW];
  weight_blend #(.KW(KW), .WGT_BITS(WGT_BITS), .ALPHA_FRAC(ALPHA_FRAC)) u_blend (
    .clk, .en(adv), .alpha, .g, .h, .w
  );

  // Reductions.
  logic [MAC_BITS-1:0] mac;
  logic [ACC_BITS-1:0] acc;
  mac_unit #(.KW(KW), .W_BITS(W_BITS)) u_mac (.clk, .en(adv), .w, .d(d2), .mac);
  acc_unit #(.KW(KW), .W_BITS(W_BITS)) u_acc (.clk, .en(adv), .w, .acc);

  // Valid / last travel in a shift register of the same length as the data path.
  logic [LAT-1:0] v_sr, l_sr;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_sr <= '0;
      l_sr <= '0;
    end else if (adv) begin
      v_sr <= {v_sr[LAT-2:0], win_valid};
      l_sr <= {l_sr[LAT-2:0], win_last};
    end
  end

  divider #(.NUM_BITS(MAC_BITS), .DEN_BITS(ACC_BITS), .Q_BITS(PIX_BITS)) u_div (
    .clk, .en(adv), .valid_in(rst_n && v_sr[LAT-LAT_DIV-1]), .num(mac), .den(acc), .q(out_depth)
  );

  assign out_valid = v_sr[LAT-1];
  assign out_last  = l_sr[LAT-1];

  // Output must be held while stalled (AXI-stream style).
  assert property (@(posedge clk) disable iff (!rst_n)
                   (out_valid && !out_ready) |=> (out_valid && $stable(out_depth)));
endmodule

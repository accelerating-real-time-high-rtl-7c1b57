// alpha_unit: depth-gradient measure Delta and sigmoid blending factor alpha(Delta).
//
// Delta is the difference between the largest and the smallest depth in the window, taken
// over the positions whose mask bit is set (the centre always is). alpha is read from a
// 2^8-entry table built at elaboration:
//   alpha(Delta) = round(2^ALPHA_FRAC / (1 + exp(-EPS * (Delta - TAU))))
// so alpha runs from about 0 in flat regions (small Delta: trust the depth range term h) to
// 2^ALPHA_FRAC = 1.0 at depth edges (large Delta: trust the colour range term g).
// Delta as max - min of the depth neighbourhood and the sigmoid shape follow the published filter; the
// min/max tree, TAU = 20 grey levels and EPS = 0.25 per level are this design's choices.
// The fraction width follows the blending formula's shift by 8.
//
// Timing: one register stage. The balanced min/max tree (ceil(log2(KW*KW)) comparator levels)
// and the table lookup are combinational in front of it.
module alpha_unit
  import nafdu_pkg::*;
#(
  parameter int KW         = 13,
  parameter int ALPHA_FRAC = 8,
  parameter int TAU        = 20,
  parameter int EPS_MILLI  = 250
) (
  input  logic                  clk,
  input  logic                  en,
  input  pix_t                  win  [KW][KW],
  input  logic                  mask [KW][KW],
  output logic [ALPHA_FRAC:0]   alpha,
  output pix_t                  delta
);
  localparam int N    = KW * KW;
  localparam int L    = $clog2(N);
  localparam int NP   = 1 << L;
  localparam int NLUT = 1 << PIX_BITS;
  typedef logic [ALPHA_FRAC:0] lut_t [NLUT];

  function automatic lut_t build_lut();
    lut_t t;
    for (int i = 0; i < NLUT; i++)
      t[i] = (ALPHA_FRAC + 1)'(sigmoid_alpha(i, TAU, EPS_MILLI, ALPHA_FRAC));
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  // Balanced tree, one generate block per node; masked and padding leaves are neutral for
  // both max (0) and min (all ones).
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar i = 0; i < (NP >> l); i++) begin : g_node
      pix_t mx_a, mx_b, mn_a, mn_b, mx, mn;
      if (l == 1) begin : g_leaf
        localparam int I0 = 2 * i, I1 = 2 * i + 1;
        if (I0 < N) begin : g_a
          assign mx_a = mask[I0 / KW][I0 % KW] ? win[I0 / KW][I0 % KW] : '0;
          assign mn_a = mask[I0 / KW][I0 % KW] ? win[I0 / KW][I0 % KW] : '1;
        end else begin : g_a_pad
          assign mx_a = '0;
          assign mn_a = '1;
        end
        if (I1 < N) begin : g_b
          assign mx_b = mask[I1 / KW][I1 % KW] ? win[I1 / KW][I1 % KW] : '0;
          assign mn_b = mask[I1 / KW][I1 % KW] ? win[I1 / KW][I1 % KW] : '1;
        end else begin : g_b_pad
          assign mx_b = '0;
          assign mn_b = '1;
        end
      end else begin : g_inner
        assign mx_a = g_lvl[l-1].g_node[2 * i].mx;
        assign mx_b = g_lvl[l-1].g_node[2 * i + 1].mx;
        assign mn_a = g_lvl[l-1].g_node[2 * i].mn;
        assign mn_b = g_lvl[l-1].g_node[2 * i + 1].mn;
      end
      assign mx = (mx_a > mx_b) ? mx_a : mx_b;
      assign mn = (mn_a < mn_b) ? mn_a : mn_b;
    end
  end

  pix_t d;
  assign d = g_lvl[L].g_node[0].mx - g_lvl[L].g_node[0].mn;

  always_ff @(posedge clk) begin
    if (en) begin
      delta <= d;
      alpha <= LUT[d];
    end
  end
endmodule

// range_weight: gaussian range term for every position of a KW x KW window.
//
// For each neighbour q of the window centre p it looks up
//   w[q] = round((2^WGT_BITS - 1) * exp(-|I_p - I_q|^2 / (2 SIGMA^2)))
// in a 2^8-entry table built at elaboration, indexed by the absolute difference of the 8-bit
// pixels. The accelerator uses one instance on the intensity window (the colour range term g)
// and one on the depth window (the depth range term h). Positions whose mask bit is low get
// weight 0, so they drop out of both the weighted sum and the normalisation.
// That g and h are gaussians of the pixel difference follows the published design; the table width
// WGT_BITS and the SIGMA defaults are this design's choices.
//
// Timing: one register stage; the weights of the window on the inputs appear one enabled
// cycle later.
module range_weight
  import nafdu_pkg::*;
#(
  parameter int KW       = 13,
  parameter int WGT_BITS = 8,
  parameter int SIGMA    = 10
) (
  input  logic                clk,
  input  logic                en,
  input  pix_t                win  [KW][KW],
  input  logic                mask [KW][KW],
  output logic [WGT_BITS-1:0] w    [KW][KW]
);
  localparam int R = (KW - 1) / 2;
  localparam int NLUT = 1 << PIX_BITS;
  typedef logic [WGT_BITS-1:0] lut_t [NLUT];

  function automatic lut_t build_lut();
    lut_t t;
    for (int i = 0; i < NLUT; i++) t[i] = WGT_BITS'(gauss_weight(i, SIGMA, WGT_BITS));
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  pix_t centre;
  assign centre = win[R][R];

  for (genvar j = 0; j < KW; j++) begin : g_row
    for (genvar k = 0; k < KW; k++) begin : g_col
      pix_t diff;
      assign diff = (win[j][k] > centre) ? win[j][k] - centre : centre - win[j][k];
      always_ff @(posedge clk) begin
        if (en) w[j][k] <= mask[j][k] ? LUT[diff] : '0;
      end
    end
  end
endmodule

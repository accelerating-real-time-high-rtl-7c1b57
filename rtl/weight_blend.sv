// weight_blend: noise-aware blending of the two range terms, per window position.
//
//   w = alpha * (g - h) + (h << ALPHA_FRAC)  =  alpha*g + (2^ALPHA_FRAC - alpha)*h
//
// with alpha an ALPHA_FRAC-bit fraction in 0..2^ALPHA_FRAC. This is the published blend of
// the colour term g and the depth term h, in the single-multiplier form its data path uses.
// The result carries ALPHA_FRAC extra fraction bits and never exceeds
// (2^WGT_BITS - 1) << ALPHA_FRAC, so it fits WGT_BITS + ALPHA_FRAC bits unsigned. A masked
// position arrives with g = h = 0 and leaves with w = 0.
//
// Timing: one register stage.
module weight_blend #(
  parameter int KW         = 13,
  parameter int WGT_BITS   = 8,
  parameter int ALPHA_FRAC = 8
) (
  input  logic                           clk,
  input  logic                           en,
  input  logic [ALPHA_FRAC:0]            alpha,
  input  logic [WGT_BITS-1:0]            g [KW][KW],
  input  logic [WGT_BITS-1:0]            h [KW][KW],
  output logic [WGT_BITS+ALPHA_FRAC-1:0] w [KW][KW]
);
  localparam int SW = WGT_BITS + ALPHA_FRAC + 3;

  for (genvar j = 0; j < KW; j++) begin : g_row
    for (genvar k = 0; k < KW; k++) begin : g_col
      logic signed [SW-1:0] blend;
      assign blend = SW'(signed'({1'b0, alpha})) *
                     (SW'(signed'({1'b0, g[j][k]})) - SW'(signed'({1'b0, h[j][k]})))
                   + SW'(signed'({1'b0, h[j][k], ALPHA_FRAC'(0)}));
      always_ff @(posedge clk) begin
        if (en) w[j][k] <= (WGT_BITS + ALPHA_FRAC)'(blend);
      end
    end
  end
endmodule

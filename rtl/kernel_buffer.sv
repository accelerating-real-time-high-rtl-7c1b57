// kernel_buffer: KW x KW sliding window over one raster-order pixel stream.
//
// The accelerator has two of these, one for intensity and one for depth. KW-1 chained line
// buffers deliver, on every push, a column of KW vertically adjacent pixels (the new pixel and
// the pixels 1..KW-1 rows above it). The window is a KW x KW register array that shifts that
// column in: after a push, win[j][k] holds the pixel pushed (j*IMG_W + k) pushes earlier, so
// row index j counts rows upwards and k counts columns leftwards from the newest pixel.
// Positions whose pixel wraps across an image edge still hold data; the controller masks them.
// The n x n window fed by line buffers follows the published design; the shift organisation is this
// design's.
//
// Timing: the window registers update on the clock edge at which push is high.
module kernel_buffer
  import nafdu_pkg::*;
#(
  parameter int KW    = 13,
  parameter int IMG_W = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  pix_t din,
  output pix_t win [KW][KW]
);
  pix_t col [KW];

  assign col[0] = din;

  for (genvar j = 1; j < KW; j++) begin : g_lb
    line_buffer #(.IMG_W(IMG_W)) u_lb (
      .clk  (clk),
      .rst_n(rst_n),
      .push (push),
      .din  (col[j-1]),
      .dout (col[j])
    );
  end

  always_ff @(posedge clk) begin
    if (push) begin
      for (int j = 0; j < KW; j++) begin
        win[j][0] <= col[j];
        for (int k = 1; k < KW; k++) win[j][k] <= win[j][k-1];
      end
    end
  end
endmodule

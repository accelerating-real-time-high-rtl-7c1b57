// scan_ctrl: raster-position controller of the streaming NAFDU accelerator.
//
// The kernel buffers see one pixel per push. A window is centred on the pixel pushed
// R*IMG_W + R pushes before the newest one (R = (KW-1)/2), so the last R rows of a frame can
// only be filtered after R*IMG_W + R more pushes. This controller therefore runs each frame
// through NPOS = IMG_W*IMG_H + R*IMG_W + R positions: the first IMG_W*IMG_H take pixels from
// the input stream, the rest are flush pushes of dummy data (the stream is held off meanwhile).
// From position R*IMG_W + R on, every push produces a window centred on a real pixel; for it
// the controller registers the centre row/column and an end-of-frame flag, and derives the
// mask of window positions whose neighbour lies inside the image. Masked positions get zero
// weight, which makes the filter renormalise at the borders and hides wrapped, stale and
// dummy pixels. The end-of-frame flush, the masking and the frame-to-frame reuse of the line
// buffers are this design's choices: the published accelerator gives the streaming (FIFO) structure only.
//
// Interface: adv is the pipeline-wide advance enable. A push happens when adv is high and
// either a flush position is due or in_valid is high; in_ready = adv and not flushing.
// win_valid/cx/cy/last/mask describe the window registered on the same push (stage 0) and
// hold while adv is low.
module scan_ctrl
  import nafdu_pkg::*;
#(
  parameter int KW    = 13,
  parameter int IMG_W = 2048,
  parameter int IMG_H = 1536
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  input  logic in_valid,
  output logic in_ready,
  output logic push,
  output logic flushing,
  output logic win_valid,
  output logic [$clog2(IMG_W)-1:0] cx,
  output logic [$clog2(IMG_H)-1:0] cy,
  output logic last,
  output logic mask [KW][KW]
);
  localparam int R     = (KW - 1) / 2;
  localparam int NPIX  = IMG_W * IMG_H;
  localparam int LEAD  = R * IMG_W + R;
  localparam int NPOS  = NPIX + LEAD;
  localparam int PW    = $clog2(NPOS);
  localparam int XW    = $clog2(IMG_W);
  localparam int YW    = $clog2(IMG_H);

  logic [PW-1:0] pos;
  logic [XW-1:0] nx;
  logic [YW-1:0] ny;
  logic          centred;

  assign flushing = (pos >= PW'(NPIX));
  assign in_ready = adv && !flushing;
  assign push     = adv && (flushing || in_valid);
  assign centred  = (pos >= PW'(LEAD));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= '0;
      nx        <= '0;
      ny        <= '0;
      cx        <= '0;
      cy        <= '0;
      last      <= 1'b0;
      win_valid <= 1'b0;
    end else if (adv) begin
      win_valid <= push && centred;
      if (push) begin
        pos <= (pos == PW'(NPOS - 1)) ? '0 : pos + 1'b1;
        if (centred) begin
          cx   <= nx;
          cy   <= ny;
          last <= (nx == XW'(IMG_W - 1)) && (ny == YW'(IMG_H - 1));
          if (nx == XW'(IMG_W - 1)) begin
            nx <= '0;
            ny <= (ny == YW'(IMG_H - 1)) ? '0 : ny + 1'b1;
          end else begin
            nx <= nx + 1'b1;
          end
        end
      end
    end
  end

  // win[j][k] holds the pixel at row cy + R - j, column cx + R - k.
  logic row_ok [KW];
  logic col_ok [KW];

  always_comb begin
    for (int j = 0; j < KW; j++) begin
      row_ok[j] = (int'(cy) + R - j >= 0) && (int'(cy) + R - j < IMG_H);
      col_ok[j] = (int'(cx) + R - j >= 0) && (int'(cx) + R - j < IMG_W);
    end
    for (int j = 0; j < KW; j++)
      for (int k = 0; k < KW; k++)
        mask[j][k] = row_ok[j] && col_ok[k];
  end

  // The centre of the window is always inside the image.
  assert property (@(posedge clk) disable iff (!rst_n) win_valid |-> mask[R][R]);
endmodule

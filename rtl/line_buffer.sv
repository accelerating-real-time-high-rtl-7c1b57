// line_buffer: one image row of delay for a pixel stream.
//
// Each push writes din into a circular memory of IMG_W entries and returns, on dout, the pixel
// that was written IMG_W pushes earlier, i.e. the pixel directly above in the previous row.
// dout is read from the location about to be overwritten, so it is valid in the same cycle as
// push (read-before-write, asynchronous read). Chaining KW-1 of these gives the KW rows a
// kernel window needs; their storage grows with the image width and the kernel height but not
// with the image height, which is the point of the streaming architecture.
// The row memory follows the published design; the circular-pointer organisation and the asynchronous
// read are this design's choices. The memory is not reset: rows read before they were written
// are masked out downstream.
//
// Timing: one push per cycle at most; dout is combinational from the pointer.
module line_buffer
  import nafdu_pkg::*;
#(
  parameter int IMG_W = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  pix_t din,
  output pix_t dout
);
  localparam int AW = (IMG_W > 1) ? $clog2(IMG_W) : 1;

  pix_t          mem [IMG_W];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    ptr <= '0;
    else if (push) ptr <= (ptr == AW'(IMG_W - 1)) ? '0 : ptr + 1'b1;
  end
endmodule

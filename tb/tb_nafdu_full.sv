// tb_nafdu_full: one complete 2048x1536 frame through the accelerator at its default
// configuration (13x13 kernel), at full rate.
//
// The depth image is two noisy flat surfaces separated by a slanted step, the intensity image
// a striped texture that crosses it, so the blending meets flat regions, depth edges and
// texture edges. Every one of the 3,145,728 output pixels is compared with a reference model
// written directly from the filter equations (alpha-blended gaussian range terms, weighted
// mean over the in-image neighbours, rounded). The testbench also checks the frame timing:
// from the first input pixel to the last output pixel takes one frame period
// (IMG_W*IMG_H + R*IMG_W + R cycles) plus the 20-cycle pipeline latency, and prints the frame
// time that gives at a 300 MHz clock.
module tb_nafdu_full;
  import nafdu_pkg::*;
  localparam int KW = 13, IMG_W = 2048, IMG_H = 1536;
  localparam int SIGMA_G = 10, SIGMA_H = 10, TAU = 20, EPS_MILLI = 250;
  localparam int R = (KW - 1) / 2, NPIX = IMG_W * IMG_H, NPOS = NPIX + R * IMG_W + R;
  localparam int LAT = 2 + 1 + $clog2(KW * KW) + PIX_BITS + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  pix_pair_t in_pix = '0;
  pix_t out_depth;

  nafdu_top dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned img_i [IMG_H][IMG_W];
  byte unsigned img_d [IMG_H][IMG_W];
  int gl [256], hl [256], al [256];
  int n_flat = 0, n_edge = 0;
  longint cyc = 0, first_in = -1, last_out = -1;

  function automatic int gauss(int d, int sigma);
    real x = real'(d);
    return int'($floor(255.0 * $exp(-x * x / (2.0 * sigma * sigma)) + 0.5));
  endfunction

  function automatic int sigm(int d);
    return int'($floor(256.0 / (1.0 + $exp(-(EPS_MILLI / 1000.0) * (real'(d) - TAU))) + 0.5));
  endfunction

  function automatic int ref_out(int y, int x, output int a);
    int mx = 0, mn = 255;
    int y0 = (y - R < 0) ? 0 : y - R, y1 = (y + R >= IMG_H) ? IMG_H - 1 : y + R;
    int x0 = (x - R < 0) ? 0 : x - R, x1 = (x + R >= IMG_W) ? IMG_W - 1 : x + R;
    int ip = img_i[y][x], dp = img_d[y][x];
    longint num = 0, den = 0;
    for (int yy = y0; yy <= y1; yy++)
      for (int xx = x0; xx <= x1; xx++) begin
        if (img_d[yy][xx] > mx) mx = img_d[yy][xx];
        if (img_d[yy][xx] < mn) mn = img_d[yy][xx];
      end
    a = al[mx - mn];
    for (int yy = y0; yy <= y1; yy++)
      for (int xx = x0; xx <= x1; xx++) begin
        automatic int di = ip - int'(img_i[yy][xx]);
        automatic int dd = dp - int'(img_d[yy][xx]);
        automatic longint w = longint'(a) * gl[di < 0 ? -di : di]
                            + longint'(256 - a) * hl[dd < 0 ? -dd : dd];
        num += w * img_d[yy][xx];
        den += w;
      end
    return int'((num + den / 2) / den);
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      gl[i] = gauss(i, SIGMA_G);
      hl[i] = gauss(i, SIGMA_H);
      al[i] = sigm(i);
    end
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        img_d[y][x] = 8'(((3 * x + y) < 3 * IMG_W / 2 ? 70 : 150) + $urandom_range(0, 6));
        img_i[y][x] = 8'((((x / 40) + (y / 30)) % 2 ? 210 : 60) + $urandom_range(0, 12));
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      in_valid = 1;
      in_pix.intensity = img_i[p / IMG_W][p % IMG_W];
      in_pix.depth     = img_d[p / IMG_W][p % IMG_W];
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk);
    in_valid = 0;
  end

  int op = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_ready && first_in < 0) first_in = cyc;
    if (rst_n && out_valid && out_ready && op < NPIX) begin
      automatic int a;
      automatic int e = ref_out(op / IMG_W, op % IMG_W, a);
      checks++;
      if (int'(out_depth) != e || out_last != (op == NPIX - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d): got %0d/%0d expected %0d",
                                    op / IMG_W, op % IMG_W, out_depth, out_last, e);
      end
      if (a <= 8) n_flat++;
      if (a >= 248) n_edge++;
      op++;
      if (op == NPIX) last_out = cyc;
    end
  end

  initial begin
    wait (op == NPIX);
    @(posedge clk);
    checks++;
    if (last_out - first_in != NPOS + LAT) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", last_out - first_in, NPOS + LAT);
    end
    checks++;
    if (n_flat == 0 || n_edge == 0) begin
      failures++;
      $display("FAIL blending range not exercised (flat %0d, edge %0d)", n_flat, n_edge);
    end
    $display("frame: %0d cycles = %0.2f ms at 300 MHz; flat %0d, edge %0d pixels",
             last_out - first_in, real'(last_out - first_in) / 300.0e3, n_flat, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPOS + NPOS / 4) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

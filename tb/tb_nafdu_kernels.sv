// tb_nafdu_kernels: the accelerator at the four kernel widths of the FPGA evaluation
// (3, 5, 7 and 13 px), side by side on the same 64x48 frame pair at full rate.
//
// Each instance gets its own driver and monitor. Every output pixel is compared with the
// reference filter for that kernel width, and each instance must take exactly
// IMG_W*IMG_H + R*IMG_W + R cycles per frame (R = (KW-1)/2): the frame period grows only by
// the R-row flush, whatever the kernel size. The image is a noisy depth step under a
// striped intensity texture, so each width sees flat and edge blending and the borders.
module tb_nafdu_kernels;
  import nafdu_pkg::*;
  localparam int IMG_W = 64, IMG_H = 48, NPIX = IMG_W * IMG_H, NK = 4, NF = 2;
  localparam int KWS [NK] = '{3, 5, 7, 13};
  localparam int SIGMA = 10, TAU = 20, EPS_MILLI = 250;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;
  int img_i [IMG_H][IMG_W];
  int img_d [IMG_H][IMG_W];
  int gl [256], al [256];
  bit ready = 0;

  function automatic int gauss(int d);
    real x = real'(d);
    return int'($floor(255.0 * $exp(-x * x / (2.0 * SIGMA * SIGMA)) + 0.5));
  endfunction

  function automatic int sigm(int d);
    return int'($floor(256.0 / (1.0 + $exp(-(EPS_MILLI / 1000.0) * (real'(d) - TAU))) + 0.5));
  endfunction

  function automatic int ref_out(int r, int y, int x);
    int mx = 0, mn = 255, a;
    longint num = 0, den = 0;
    for (int yy = y - r; yy <= y + r; yy++)
      for (int xx = x - r; xx <= x + r; xx++)
        if (yy >= 0 && yy < IMG_H && xx >= 0 && xx < IMG_W) begin
          if (img_d[yy][xx] > mx) mx = img_d[yy][xx];
          if (img_d[yy][xx] < mn) mn = img_d[yy][xx];
        end
    a = al[mx - mn];
    for (int yy = y - r; yy <= y + r; yy++)
      for (int xx = x - r; xx <= x + r; xx++)
        if (yy >= 0 && yy < IMG_H && xx >= 0 && xx < IMG_W) begin
          automatic int di = img_i[y][x] - img_i[yy][xx];
          automatic int dd = img_d[y][x] - img_d[yy][xx];
          automatic longint w = longint'(a) * gl[di < 0 ? -di : di]
                              + longint'(256 - a) * gl[dd < 0 ? -dd : dd];
          num += w * img_d[yy][xx];
          den += w;
        end
    return int'((num + den / 2) / den);
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      gl[i] = gauss(i);
      al[i] = sigm(i);
    end
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        img_d[y][x] = ((2 * x + y) < IMG_W ? 50 : 140) + $urandom_range(0, 5);
        img_i[y][x] = (((x / 5) + (y / 4)) % 2 ? 190 : 70) + $urandom_range(0, 10);
      end
    ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  for (genvar n = 0; n < NK; n++) begin : g_k
    localparam int KW = KWS[n], R = (KW - 1) / 2, NPOS = NPIX + R * IMG_W + R;
    logic in_valid = 0, in_ready, out_valid, out_last;
    pix_pair_t in_pix = '0;
    pix_t out_depth;
    longint cyc = 0, last_at [NF];
    int op = 0, of = 0;

    nafdu_top #(.KW(KW), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_pix,
      .out_valid, .out_ready(1'b1), .out_depth, .out_last
    );

    initial begin
      wait (rst_n);
      for (int f = 0; f < NF; f++)
        for (int p = 0; p < NPIX; p++) begin
          @(negedge clk);
          in_valid = 1;
          in_pix.intensity = pix_t'(img_i[p / IMG_W][p % IMG_W]);
          in_pix.depth     = pix_t'(img_d[p / IMG_W][p % IMG_W]);
          do @(posedge clk); while (!in_ready);
        end
      @(negedge clk);
      in_valid = 0;
    end

    always @(posedge clk) begin
      cyc++;
      if (rst_n && out_valid && of < NF) begin
        automatic int e = ref_out(R, op / IMG_W, op % IMG_W);
        checks++;
        if (int'(out_depth) != e || out_last != (op == NPIX - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL KW=%0d pixel %0d: got %0d expected %0d",
                                      KW, op, out_depth, e);
        end
        op++;
        if (op == NPIX) begin
          last_at[of] = cyc;
          op = 0;
          of++;
          if (of == NF) begin
            checks++;
            if (last_at[1] - last_at[0] != NPOS) begin
              failures++;
              $display("FAIL KW=%0d frame period %0d, expected %0d", KW, last_at[1] - last_at[0], NPOS);
            end
            $display("KW=%0d: frame period %0d cycles", KW, last_at[1] - last_at[0]);
            done++;
          end
        end
      end
    end
  end

  initial begin
    wait (done == NK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NF * (NPIX + 7 * IMG_W)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nafdu_top: end-to-end test of the NAFDU accelerator on a small image (24x16, 5x5 kernel).
//
// Four frames are streamed back to back. Frames 0 and 1 run at full rate (input always valid,
// output always ready), and the time between their end-of-frame outputs must equal one frame
// period, IMG_W*IMG_H + R*IMG_W + R cycles. Frames 2 and 3 have random input gaps and random
// output stalls. Each frame is a depth step (two flat regions with noise) under a striped
// intensity texture, so the filter meets flat regions (alpha near 0: depth term), depth edges
// (alpha near 1: colour term) and image borders. Every output pixel and its end-of-frame flag
// are compared with a reference model written directly from the filter equations:
//   w_q = a*g + (256 - a)*h,  out = (sum w_q*D_q + sum w_q / 2) / sum w_q
// over the in-image neighbours q. The testbench also counts how often each mechanism
// occurred (stall, input gap, flush, border window, flat and edge blending, frame change)
// and fails if one never did.
module tb_nafdu_top;
  import nafdu_pkg::*;
  localparam int KW = 5, IMG_W = 24, IMG_H = 16, NF = 4;
  localparam int SIGMA_G = 10, SIGMA_H = 10, TAU = 20, EPS_MILLI = 250;
  localparam int R = (KW - 1) / 2, NPIX = IMG_W * IMG_H, NPOS = NPIX + R * IMG_W + R;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  pix_pair_t in_pix = '0;
  pix_t out_depth;

  nafdu_top #(.KW(KW), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img_i [NF][IMG_H][IMG_W];
  int img_d [NF][IMG_H][IMG_W];
  int gl [256], hl [256], al [256];
  int n_stall = 0, n_gap = 0, n_flush = 0, n_border = 0, n_flat = 0, n_edge = 0, n_frames = 0;
  longint cyc = 0, last_at [NF];

  function automatic int gauss(int d, int sigma);
    real x = real'(d);
    return int'($floor(255.0 * $exp(-x * x / (2.0 * sigma * sigma)) + 0.5));
  endfunction

  function automatic int sigm(int d);
    return int'($floor(256.0 / (1.0 + $exp(-(EPS_MILLI / 1000.0) * (real'(d) - TAU))) + 0.5));
  endfunction

  function automatic int ref_out(int f, int y, int x);
    int mx = 0, mn = 255, a;
    longint num = 0, den = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++)
        if (y + dy >= 0 && y + dy < IMG_H && x + dx >= 0 && x + dx < IMG_W) begin
          if (img_d[f][y+dy][x+dx] > mx) mx = img_d[f][y+dy][x+dx];
          if (img_d[f][y+dy][x+dx] < mn) mn = img_d[f][y+dy][x+dx];
        end
    a = al[mx - mn];
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++)
        if (y + dy >= 0 && y + dy < IMG_H && x + dx >= 0 && x + dx < IMG_W) begin
          automatic int di = img_i[f][y][x] - img_i[f][y+dy][x+dx];
          automatic int dd = img_d[f][y][x] - img_d[f][y+dy][x+dx];
          automatic longint w = longint'(a) * gl[di < 0 ? -di : di]
                              + longint'(256 - a) * hl[dd < 0 ? -dd : dd];
          num += w * img_d[f][y+dy][x+dx];
          den += w;
        end
    return int'((num + den / 2) / den);
  endfunction

  function automatic int ref_alpha(int f, int y, int x);
    int mx = 0, mn = 255;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++)
        if (y + dy >= 0 && y + dy < IMG_H && x + dx >= 0 && x + dx < IMG_W) begin
          if (img_d[f][y+dy][x+dx] > mx) mx = img_d[f][y+dy][x+dx];
          if (img_d[f][y+dy][x+dx] < mn) mn = img_d[f][y+dy][x+dx];
        end
    return al[mx - mn];
  endfunction

  // Stimulus images.
  initial begin
    for (int i = 0; i < 256; i++) begin
      gl[i] = gauss(i, SIGMA_G);
      hl[i] = gauss(i, SIGMA_H);
      al[i] = sigm(i);
    end
    for (int f = 0; f < NF; f++) begin
      automatic int lo = 40 + 10 * f, hi = 170 - 5 * f;
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          img_d[f][y][x] = ((x + y / 2 + f) < IMG_W / 2 ? lo : hi) + $urandom_range(0, 4);
          img_i[f][y][x] = (((x / 3 + y / 2) % 2) ? 200 : 50) + $urandom_range(0, 10);
        end
    end
  end

  // Driver.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++)
      for (int p = 0; p < NPIX; p++) begin
        @(negedge clk);
        if (f >= 2) while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_pix.intensity = pix_t'(img_i[f][p / IMG_W][p % IMG_W]);
        in_pix.depth     = pix_t'(img_d[f][p / IMG_W][p % IMG_W]);
        do @(posedge clk); while (!in_ready);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // Output back-pressure in frames 2 and 3.
  always @(negedge clk) out_ready <= (n_frames < 2) ? 1'b1 : ($urandom_range(0, 2) != 0);

  // Monitor.
  int of = 0, op = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (out_valid && !out_ready) n_stall++;
      if (in_ready && !in_valid) n_gap++;
      if (dut.push && dut.flushing) n_flush++;
      if (out_valid && out_ready && of < NF) begin
        automatic int y = op / IMG_W, x = op % IMG_W;
        automatic int e = ref_out(of, y, x);
        automatic int a = ref_alpha(of, y, x);
        checks += 2;
        if (int'(out_depth) != e) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d (%0d,%0d): got %0d expected %0d",
                                      of, y, x, out_depth, e);
        end
        if (out_last != (op == NPIX - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL out_last at frame %0d pixel %0d", of, op);
        end
        if (y < R || y >= IMG_H - R || x < R || x >= IMG_W - R) n_border++;
        if (a <= 8) n_flat++;
        if (a >= 248) n_edge++;
        op++;
        if (op == NPIX) begin
          last_at[of] = cyc;
          op = 0;
          of++;
          n_frames++;
        end
      end
    end
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (n_frames == NF);
    repeat (2) @(posedge clk);
    // Full-rate frame period.
    checks++;
    if (last_at[1] - last_at[0] != NPOS) begin
      failures++;
      $display("FAIL frame period %0d cycles, expected %0d", last_at[1] - last_at[0], NPOS);
    end
    need(n_stall, "output stall");
    need(n_gap, "input gap");
    need(n_flush, "end-of-frame flush");
    need(n_border, "border window");
    need(n_flat, "flat blending (alpha ~ 0)");
    need(n_edge, "edge blending (alpha ~ 1)");
    need(n_frames - 1, "back-to-back frames");
    $display("stalls=%0d gaps=%0d flushes=%0d border=%0d flat=%0d edge=%0d frames=%0d",
             n_stall, n_gap, n_flush, n_border, n_flat, n_edge, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NF * NPOS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

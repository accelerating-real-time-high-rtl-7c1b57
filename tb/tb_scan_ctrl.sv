// tb_scan_ctrl: drives the controller of a 5x4 image with a 3x3 kernel through three frames
// with random pipeline stalls (adv) and random input gaps (in_valid). An independent position
// counter in the testbench predicts in_ready, push and the flush phase; every window the
// controller announces is checked for its centre coordinates, end-of-frame flag and border
// mask. Also checks that each frame has exactly R*IMG_W + R flush pushes.
module tb_scan_ctrl;
  localparam int KW = 3, IMG_W = 5, IMG_H = 4;
  localparam int R = (KW - 1) / 2, NPIX = IMG_W * IMG_H, LEAD = R * IMG_W + R;
  localparam int NPOS = NPIX + LEAD;

  logic clk = 0, rst_n = 0, adv = 0, in_valid = 0;
  logic in_ready, push, flushing, win_valid, last;
  logic [$clog2(IMG_W)-1:0] cx;
  logic [$clog2(IMG_H)-1:0] cy;
  logic mask [KW][KW];
  int checks = 0, failures = 0;
  int pos = 0, frames = 0, flushes = 0, windows = 0;
  bit exp_wv = 0, push_s = 0;
  int exp_c = 0;

  scan_ctrl #(.KW(KW), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (pos %0d)", what, pos);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    while (frames < 3) begin
      @(negedge clk);
      adv      = ($urandom_range(0, 3) != 0);
      in_valid = ($urandom_range(0, 2) != 0);
      #1;
      check(flushing == (pos >= NPIX), "flushing");
      check(in_ready == (adv && pos < NPIX), "in_ready");
      check(push == (adv && (pos >= NPIX || in_valid)), "push");
      push_s = push;
      @(posedge clk);
      #1;
      if (adv) begin
        exp_wv = push_s && (pos >= LEAD);
        exp_c  = pos - LEAD;
        if (push_s) begin
          if (pos >= NPIX) flushes++;
          pos++;
          if (pos == NPOS) begin
            pos = 0;
            frames++;
            check(flushes == LEAD, "flush count");
            flushes = 0;
          end
        end
      end
      check(win_valid == exp_wv, "win_valid");
      if (win_valid && exp_wv) begin
        if (adv) windows++;
        check(int'(cx) == exp_c % IMG_W && int'(cy) == exp_c / IMG_W, "centre");
        check(last == (exp_c == NPIX - 1), "last");
        for (int j = 0; j < KW; j++)
          for (int k = 0; k < KW; k++) begin
            automatic int y = exp_c / IMG_W + R - j;
            automatic int x = exp_c % IMG_W + R - k;
            check(mask[j][k] == (y >= 0 && y < IMG_H && x >= 0 && x < IMG_W), "mask");
          end
      end
    end
    check(windows == 3 * NPIX, "window count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_range_weight: random 3x3 windows and masks into a gaussian range unit (sigma 10, 8-bit
// weights). Every output is compared with round(255 * exp(-d^2/200)) for the absolute
// centre/neighbour difference d, or 0 where masked. Windows with large and small spreads are
// both generated so that the whole table is exercised.
module tb_range_weight;
  import nafdu_pkg::*;
  localparam int KW = 3, WB = 8, SIGMA = 10;

  logic clk = 0, en = 1;
  pix_t win  [KW][KW];
  logic mask [KW][KW];
  logic [WB-1:0] w [KW][KW];
  int checks = 0, failures = 0;

  range_weight #(.KW(KW), .WGT_BITS(WB), .SIGMA(SIGMA)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_w(int a, int b);
    real d = real'(a - b);
    return int'($floor(255.0 * $exp(-d * d / (2.0 * SIGMA * SIGMA)) + 0.5));
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      automatic int c = $urandom_range(0, 255);
      automatic int spread = (t % 2) ? 12 : 255;
      @(negedge clk);
      for (int j = 0; j < KW; j++)
        for (int k = 0; k < KW; k++) begin
          automatic int v = c + $urandom_range(0, 2 * spread) - spread;
          win[j][k]  = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
          mask[j][k] = ($urandom_range(0, 4) != 0);
        end
      mask[1][1] = 1;
      @(posedge clk);
      #1;
      for (int j = 0; j < KW; j++)
        for (int k = 0; k < KW; k++) begin
          automatic int e = mask[j][k] ? ref_w(win[j][k], win[1][1]) : 0;
          checks++;
          if (int'(w[j][k]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL c=%0d q=%0d m=%0d w=%0d exp %0d",
                                        win[1][1], win[j][k], mask[j][k], w[j][k], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

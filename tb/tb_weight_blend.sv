// tb_weight_blend: random alpha (0..256), g and h for a 3x3 window; checks every blended
// weight against alpha*g + (256 - alpha)*h, which is the same value as alpha*(g-h) + (h << 8)
// written in the other form, and checks the one-cycle latency and the enable.
module tb_weight_blend;
  localparam int KW = 3, WB = 8, AF = 8;

  logic clk = 0, en = 0;
  logic [AF:0] alpha = '0;
  logic [WB-1:0] g [KW][KW];
  logic [WB-1:0] h [KW][KW];
  logic [WB+AF-1:0] w [KW][KW];
  logic [WB+AF-1:0] held [KW][KW];
  int checks = 0, failures = 0;

  weight_blend #(.KW(KW), .WGT_BITS(WB), .ALPHA_FRAC(AF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      en = 1;
      case (t % 5)
        0: alpha = '0;
        1: alpha = 9'(1 << AF);
        default: alpha = 9'($urandom_range(0, 1 << AF));
      endcase
      for (int j = 0; j < KW; j++)
        for (int k = 0; k < KW; k++) begin
          g[j][k] = WB'($urandom);
          h[j][k] = WB'($urandom);
        end
      @(posedge clk);
      #1;
      for (int j = 0; j < KW; j++)
        for (int k = 0; k < KW; k++) begin
          automatic int exp_w = int'(alpha) * int'(g[j][k]) + ((1 << AF) - int'(alpha)) * int'(h[j][k]);
          checks++;
          if (int'(w[j][k]) != exp_w) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d g=%0d h=%0d w=%0d exp %0d",
                                        alpha, g[j][k], h[j][k], w[j][k], exp_w);
          end
        end
      // With en low the output must hold.
      held = w;
      @(negedge clk);
      en = 0;
      alpha = 9'($urandom_range(0, 256));
      @(posedge clk);
      #1;
      checks++;
      if (w != held) failures++;
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

// tb_acc_unit: random 16-bit weights for a 3x3 window, one window per
// enabled cycle with random enable gaps. Each sum of w is checked exactly
// 1 + ceil(log2(9)) = 5 enabled cycles after its window was presented.
module tb_acc_unit;
  import nafdu_pkg::*;
  localparam int KW = 3, WB = 16, LAT = 1 + $clog2(KW * KW);
  localparam int OW = WB + $clog2(KW * KW);

  logic clk = 0, en = 0;
  logic [WB-1:0] w [KW][KW];

  logic [OW-1:0] acc;
  int checks = 0, failures = 0;
  longint exp_s [$];

  acc_unit #(.KW(KW), .W_BITS(WB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      if (en) begin
        automatic longint s = 0;
        for (int j = 0; j < KW; j++)
          for (int k = 0; k < KW; k++) begin
            w[j][k] = (t % 11 == 0) ? '1 : WB'($urandom);

            s += longint'(w[j][k]);
          end
        exp_s.push_back(s);
        @(posedge clk);
        #1;
        if (exp_s.size() >= LAT) begin
          checks++;
          if (longint'(acc) != exp_s[0]) begin
            failures++;
            if (failures < 10) $display("FAIL acc=%0d exp %0d", acc, exp_s[0]);
          end
          void'(exp_s.pop_front());
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

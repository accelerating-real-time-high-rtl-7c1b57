// tb_kernel_buffer: pushes a random stream through a 3x3 kernel buffer on a 6-pixel-wide image
// and checks after every push that win[j][k] equals the pixel pushed j*IMG_W + k pushes before
// the newest one (j rows up, k columns left), for every position that history covers.
module tb_kernel_buffer;
  import nafdu_pkg::*;
  localparam int KW = 3, IMG_W = 6;

  logic clk = 0, rst_n = 0, push = 0;
  pix_t din = '0;
  pix_t win [KW][KW];
  int checks = 0, failures = 0, n = 0;
  pix_t hist [$];

  kernel_buffer #(.KW(KW), .IMG_W(IMG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      push = ($urandom_range(0, 2) != 0);
      din  = pix_t'($urandom);
      if (push) begin
        hist.push_back(din);
        n++;
      end
      @(posedge clk);
      #1;
      if (push) begin
        for (int j = 0; j < KW; j++)
          for (int k = 0; k < KW; k++) begin
            automatic int idx = n - 1 - j * IMG_W - k;
            if (idx >= 0) begin
              checks++;
              if (win[j][k] !== hist[idx]) begin
                failures++;
                if (failures < 10)
                  $display("FAIL n=%0d win[%0d][%0d]=%0d expected %0d", n, j, k, win[j][k], hist[idx]);
              end
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

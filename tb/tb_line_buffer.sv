// tb_line_buffer: checks that a line buffer returns, on every push, the pixel pushed exactly
// IMG_W pushes earlier, with pushes arriving at random (gaps must not shift the delay).
// A reference history of all pushed values is kept in the testbench.
module tb_line_buffer;
  import nafdu_pkg::*;
  localparam int IMG_W = 7;

  logic clk = 0, rst_n = 0, push = 0;
  pix_t din = '0, dout;
  int checks = 0, failures = 0, npush = 0;
  pix_t hist [$];

  line_buffer #(.IMG_W(IMG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      push = ($urandom_range(0, 3) != 0);
      din  = pix_t'($urandom);
      if (push) begin
        if (npush >= IMG_W) begin
          checks++;
          if (dout !== hist[npush - IMG_W]) begin
            failures++;
            $display("FAIL push %0d: dout=%0d expected %0d", npush, dout, hist[npush - IMG_W]);
          end
        end
        hist.push_back(din);
        npush++;
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

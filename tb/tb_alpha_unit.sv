// tb_alpha_unit: random 5x5 depth windows and masks. Checks Delta (max - min over the unmasked
// positions) and alpha = round(256 / (1 + exp(-0.25 (Delta - 20)))) against a direct
// computation, and that alpha reaches both ends of its range (flat and edge windows).
module tb_alpha_unit;
  import nafdu_pkg::*;
  localparam int KW = 5, AF = 8, TAU = 20, EPS_MILLI = 250;

  logic clk = 0, en = 1;
  pix_t win  [KW][KW];
  logic mask [KW][KW];
  logic [AF:0] alpha;
  pix_t delta;
  int checks = 0, failures = 0, n_flat = 0, n_edge = 0;

  alpha_unit #(.KW(KW), .ALPHA_FRAC(AF), .TAU(TAU), .EPS_MILLI(EPS_MILLI)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_alpha(int d);
    real e = EPS_MILLI / 1000.0;
    return int'($floor(256.0 / (1.0 + $exp(-e * (real'(d) - TAU))) + 0.5));
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic int c = $urandom_range(0, 255);
      automatic int spread = $urandom_range(0, 60);
      automatic int mx, mn;
      @(negedge clk);
      for (int j = 0; j < KW; j++)
        for (int k = 0; k < KW; k++) begin
          automatic int v = c + $urandom_range(0, 2 * spread) - spread;
          win[j][k]  = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
          mask[j][k] = ($urandom_range(0, 3) != 0);
        end
      mask[2][2] = 1;
      mx = win[2][2];
      mn = win[2][2];
      for (int j = 0; j < KW; j++)
        for (int k = 0; k < KW; k++)
          if (mask[j][k]) begin
            if (win[j][k] > mx) mx = win[j][k];
            if (win[j][k] < mn) mn = win[j][k];
          end
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(delta) != mx - mn) begin
        failures++;
        if (failures < 10) $display("FAIL delta=%0d exp %0d", delta, mx - mn);
      end
      if (int'(alpha) != ref_alpha(mx - mn)) begin
        failures++;
        if (failures < 10) $display("FAIL alpha=%0d exp %0d (delta %0d)", alpha, ref_alpha(mx - mn), mx - mn);
      end
      if (alpha < 9'd16) n_flat++;
      if (alpha > 9'd240) n_edge++;
    end
    checks++;
    if (n_flat == 0 || n_edge == 0) begin
      failures++;
      $display("FAIL alpha range not covered: flat=%0d edge=%0d", n_flat, n_edge);
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

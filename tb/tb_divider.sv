// tb_divider: streams random (num, den) pairs with num <= 255 * den through the pipelined
// divider, one per cycle with occasional enable gaps, and checks every quotient against
// floor((num + floor(den/2)) / den) exactly Q_BITS + 1 = 9 enabled cycles later.
module tb_divider;
  localparam int NB = 40, DB = 32, QB = 8, LAT = QB + 1;

  logic clk = 0, en = 0, valid_in = 0;
  logic [NB-1:0] num = '0;
  logic [DB-1:0] den = 1;
  logic [QB-1:0] q;
  int checks = 0, failures = 0;
  longint exp_q [$];
  int     sent = 0;

  divider #(.NUM_BITS(NB), .DEN_BITS(DB), .Q_BITS(QB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      if (en) begin
        automatic longint d = (t % 3 == 0) ? longint'($urandom_range(1, 300))
                                           : longint'($urandom) & 64'hFF_FFFF;
        automatic longint n;
        if (d == 0) d = 1;
        n = (longint'($urandom) * d) % (255 * d + 1);
        if (t % 7 == 0) n = 255 * d;
        num = NB'(n);
        den = DB'(d);
        valid_in = 1;
        exp_q.push_back((n + d / 2) / d);
        sent++;
        // Compare once the pipeline has filled.
        if (exp_q.size() >= LAT) begin
          @(posedge clk);
          #1;
          checks++;
          if (longint'(q) != exp_q[0]) begin
            failures++;
            if (failures < 10) $display("FAIL q=%0d exp %0d", q, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
      end else valid_in = 0;
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

// adder_tree: pipelined sum of N unsigned operands.
//
// A balanced binary tree with one register per level: ceil(log2(N)) levels, inputs padded with
// zeros to a power of two. OW must cover IW + ceil(log2(N)) bits for the sum to be exact.
// Used by the MAC and ACC reductions over the kernel window.
//
// Timing: latency LAT = ceil(log2(N)) enabled cycles (at least 1), one new sum per cycle.
module adder_tree #(
  parameter int N  = 169,
  parameter int IW = 24,
  parameter int OW = 32
) (
  input  logic          clk,
  input  logic          en,
  input  logic [IW-1:0] din [N],
  output logic [OW-1:0] sum
);
  localparam int L   = (N > 1) ? $clog2(N) : 1;
  localparam int NP  = 1 << L;

  // One generate block per tree node keeps every partial sum a separate register.
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar i = 0; i < (NP >> l); i++) begin : g_node
      logic [OW-1:0] a, b, s;
      if (l == 1) begin : g_leaf
        if (2 * i < N) begin : g_a
          assign a = OW'(din[2 * i]);
        end else begin : g_a_pad
          assign a = '0;
        end
        if (2 * i + 1 < N) begin : g_b
          assign b = OW'(din[2 * i + 1]);
        end else begin : g_b_pad
          assign b = '0;
        end
      end else begin : g_inner
        assign a = g_lvl[l-1].g_node[2 * i].s;
        assign b = g_lvl[l-1].g_node[2 * i + 1].s;
      end
      always_ff @(posedge clk) begin
        if (en) s <= a + b;
      end
    end
  end

  assign sum = g_lvl[L].g_node[0].s;
endmodule

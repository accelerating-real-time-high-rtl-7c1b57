// acc_unit: sum of the blended weights over the window, the normalisation k_p of the filter.
//
//   ACC = sum over the KW x KW window of w[q]
//
// An input register followed by a pipelined adder tree; the extra register gives it the same
// latency as mac_unit so that the two sums reach the divider together. The sum of weights as
// the normaliser follows the published design; the structure is this design's.
//
// Timing: latency LAT = 1 + ceil(log2(KW*KW)) enabled cycles.
module acc_unit #(
  parameter int KW     = 13,
  parameter int W_BITS = 16,
  parameter int OW     = W_BITS + $clog2(KW * KW)
) (
  input  logic              clk,
  input  logic              en,
  input  logic [W_BITS-1:0] w [KW][KW],
  output logic [OW-1:0]     acc
);
  localparam int N = KW * KW;

  logic [W_BITS-1:0] wr [N];

  for (genvar i = 0; i < N; i++) begin : g_reg
    always_ff @(posedge clk) begin
      if (en) wr[i] <= w[i / KW][i % KW];
    end
  end

  adder_tree #(.N(N), .IW(W_BITS), .OW(OW)) u_tree (
    .clk(clk), .en(en), .din(wr), .sum(acc)
  );
endmodule

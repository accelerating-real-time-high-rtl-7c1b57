// mac_unit: weighted sum of the depth window, the numerator of the filter.
//
//   MAC = sum over the KW x KW window of w[q] * D[q]
//
// Every position has its own multiplier (a registered stage of KW*KW products); a pipelined
// adder tree then reduces them, so one window is accepted per cycle. Fully parallel
// multiply-accumulate with generated adder trees is how the published accelerator performs the reduction;
// the register placement is this design's. Sum width is exact:
// W_BITS + 8 + ceil(log2(KW*KW)) bits.
//
// Timing: latency LAT = 1 + ceil(log2(KW*KW)) enabled cycles.
module mac_unit
  import nafdu_pkg::*;
#(
  parameter int KW     = 13,
  parameter int W_BITS = 16,
  parameter int OW     = W_BITS + PIX_BITS + $clog2(KW * KW)
) (
  input  logic              clk,
  input  logic              en,
  input  logic [W_BITS-1:0] w [KW][KW],
  input  pix_t              d [KW][KW],
  output logic [OW-1:0]     mac
);
  localparam int N  = KW * KW;
  localparam int PW = W_BITS + PIX_BITS;

  logic [PW-1:0] prod [N];

  for (genvar i = 0; i < N; i++) begin : g_mul
    always_ff @(posedge clk) begin
      if (en) prod[i] <= PW'(w[i / KW][i % KW]) * PW'(d[i / KW][i % KW]);
    end
  end

  adder_tree #(.N(N), .IW(PW), .OW(OW)) u_tree (
    .clk(clk), .en(en), .din(prod), .sum(mac)
  );
endmodule

// divider: pipelined unsigned division with rounding, the normalisation step of the filter.
//
//   q = floor((num + floor(den / 2)) / den)      (round to nearest)
//
// The quotient is a weighted mean of 8-bit depths, so it is known to fit Q_BITS bits; the
// divider is a restoring divider that resolves one quotient bit per stage, most significant
// first, with a register after every stage: one division enters and one leaves each cycle.
// Dividing the weighted sum by the sum of weights follows the published design; rounding and the
// restoring structure are this design's. Requires den > 0 and num + den/2 < den * 2^Q_BITS
// (checked by an assertion when valid_in is high).
//
// Timing: latency Q_BITS + 1 enabled cycles.
module divider #(
  parameter int NUM_BITS = 40,
  parameter int DEN_BITS = 32,
  parameter int Q_BITS   = 8
) (
  input  logic                clk,
  input  logic                en,
  input  logic                valid_in,
  input  logic [NUM_BITS-1:0] num,
  input  logic [DEN_BITS-1:0] den,
  output logic [Q_BITS-1:0]   q
);
  localparam int RW = NUM_BITS + 1;

  logic [RW-1:0]       rem [Q_BITS+1];
  logic [DEN_BITS-1:0] dv  [Q_BITS+1];
  logic [Q_BITS-1:0]   qq  [Q_BITS+1];

  always_ff @(posedge clk) begin
    if (en) begin
      rem[0] <= RW'(num) + RW'(den >> 1);
      dv[0]  <= den;
      qq[0]  <= '0;
    end
  end

  for (genvar s = 1; s <= Q_BITS; s++) begin : g_stage
    localparam int B = Q_BITS - s;  // quotient bit resolved here
    logic [RW+Q_BITS-1:0] shifted;
    assign shifted = (RW + Q_BITS)'(dv[s-1]) << B;
    always_ff @(posedge clk) begin
      if (en) begin
        dv[s] <= dv[s-1];
        if ((RW + Q_BITS)'(rem[s-1]) >= shifted) begin
          rem[s]   <= RW'((RW + Q_BITS)'(rem[s-1]) - shifted);
          qq[s]    <= qq[s-1] | (Q_BITS'(1) << B);
        end else begin
          rem[s]   <= rem[s-1];
          qq[s]    <= qq[s-1];
        end
      end
    end
  end

  assign q = qq[Q_BITS];

  assert property (@(posedge clk) (en && valid_in) |->
                   (den != 0) && ((NUM_BITS + Q_BITS + 1)'(num) + ((NUM_BITS + Q_BITS + 1)'(den) >> 1) <
                                  ((NUM_BITS + Q_BITS + 1)'(den) << Q_BITS)));
endmodule

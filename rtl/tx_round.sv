// tx_round - output stage: rounding right shift for the inverse transform.
//
// For the inverse transform each of the four samples becomes (y + 32) >> 6, an
// arithmetic shift, which is H.264's reconstruction scaling with rounding; four
// adders do it. For the forward and Hadamard transforms the stage is bypassed
// and y passes unchanged. The sum is formed one bit wider than W so that
// y + 32 cannot wrap; the result always fits W bits. Combinational.
// The function and the bypass follow the published architecture; the extra sum bit is
// this design's choice.
module tx_round
  import tx_pkg::*;
#(
  parameter int unsigned W = TX_W
) (
  input  xform_t              mode,
  input  logic signed [W-1:0] y [4],
  output logic signed [W-1:0] z [4]
);

  logic signed [W:0] sum [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      sum[i] = $signed({y[i][W-1], y[i]}) + (W+1)'(32);
      z[i]   = (mode == XF_INV) ? W'(sum[i] >>> 6) : y[i];
    end
  end

endmodule

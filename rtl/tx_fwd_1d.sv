// tx_fwd_1d - dedicated 1D forward 4x4 integer transform (combinational).
//
// Y = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1] x, by the butterfly fast
// algorithm with eight adders:
//   a0 = X0 + X3   a1 = X1 + X2   a2 = X1 - X2   a3 = X0 - X3   (IW+1 bits)
//   Y0 = a0 + a1   Y2 = a0 - a1   Y1 = 2*a3 + a2  Y3 = a3 - 2*a2 (OW bits)
// The factor 2 is wiring. Each stage is sized to its dynamic range: the first
// column grows one bit, the outputs three bits over the input, so OW = IW + 3
// is exact (9-bit residuals give 12-bit row results, 12-bit inputs 15-bit
// column results). The algorithm and the widths follow the published architecture.
module tx_fwd_1d #(
  parameter int unsigned IW = 9,   // input sample width
  parameter int unsigned OW = 12   // output sample width
) (
  input  logic signed [IW-1:0] x [4],
  output logic signed [OW-1:0] y [4]
);

  logic signed [IW:0] a0, a1, a2, a3;

  always_comb begin
    a0 = (IW+1)'(x[0]) + (IW+1)'(x[3]);
    a1 = (IW+1)'(x[1]) + (IW+1)'(x[2]);
    a2 = (IW+1)'(x[1]) - (IW+1)'(x[2]);
    a3 = (IW+1)'(x[0]) - (IW+1)'(x[3]);
    y[0] = OW'(a0) + OW'(a1);
    y[2] = OW'(a0) - OW'(a1);
    y[1] = (OW'(a3) <<< 1) + OW'(a2);
    y[3] = OW'(a3) - (OW'(a2) <<< 1);
  end

endmodule

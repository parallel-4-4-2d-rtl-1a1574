// tx_had_1d - dedicated 1D 4x4 Hadamard transform (combinational).
//
// Y = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1] x: the forward transform's
// butterfly with the factor 2 removed, eight adders:
//   a0 = X0 + X3   a1 = X1 + X2   a2 = X1 - X2   a3 = X0 - X3   (IW+1 bits)
//   Y0 = a0 + a1   Y2 = a0 - a1   Y1 = a3 + a2   Y3 = a3 - a2   (OW bits)
// One pass grows the range by two bits, so OW = IW + 2 is exact (14-bit DC
// inputs give 16-bit row results). Algorithm and row-pass widths follow the
// published architecture.
module tx_had_1d #(
  parameter int unsigned IW = 14,
  parameter int unsigned OW = 16
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
    y[1] = OW'(a3) + OW'(a2);
    y[3] = OW'(a3) - OW'(a2);
  end

endmodule

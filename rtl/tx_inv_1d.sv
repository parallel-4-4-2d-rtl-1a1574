// tx_inv_1d - dedicated 1D inverse 4x4 integer transform (combinational).
//
// Y = [1 1 1 1/2; 1 1/2 -1 -1; 1 -1/2 -1 1; 1 -1 1 -1/2] x, the H.264 inverse
// core transform, by its butterfly with eight adders:
//   b0 = F0 + F2       b1 = F0 - F2                          (IW+1 bits)
//   b2 = F1/2 - F3     b3 = F1 + F3/2
//   Y0 = b0 + b3   Y1 = b1 + b2   Y2 = b1 - b2   Y3 = b0 - b3 (OW bits)
// "/2" is an arithmetic right shift by one, i.e. wiring. A pass can grow the
// magnitude by up to 3.5x; H.264 guarantees that conforming streams fit 16-bit
// arithmetic, so OW = 16 is the intended use. Algorithm from the
// published architecture; the widths of the intermediate stages are this design's.
module tx_inv_1d #(
  parameter int unsigned IW = 15,
  parameter int unsigned OW = 16
) (
  input  logic signed [IW-1:0] x [4],
  output logic signed [OW-1:0] y [4]
);

  logic signed [IW:0] b0, b1, b2, b3;

  always_comb begin
    b0 = (IW+1)'(x[0]) + (IW+1)'(x[2]);
    b1 = (IW+1)'(x[0]) - (IW+1)'(x[2]);
    b2 = (IW+1)'(x[1] >>> 1) - (IW+1)'(x[3]);
    b3 = (IW+1)'(x[1]) + (IW+1)'(x[3] >>> 1);
    y[0] = OW'(b0) + OW'(b3);
    y[1] = OW'(b1) + OW'(b2);
    y[2] = OW'(b1) - OW'(b2);
    y[3] = OW'(b0) - OW'(b3);
  end

endmodule

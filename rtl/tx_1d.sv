// tx_1d - reconfigurable one-dimensional 4-point transform, one clock-free pass.
//
// Computes, on the vector x = (X0, X1, X2, X3), one of
//   XF_FWD  forward integer transform   Y = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1] x
//   XF_INV  inverse integer transform   Y = [1 1 1 1/2; 1 1/2 -1 -1; 1 -1/2 -1 1; 1 -1 1 -1/2] x
//   XF_HAD  Hadamard transform          Y = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1] x
// using the butterfly fast algorithms: four adders in a first column and four
// in a second, eight in all for every transform. The three algorithms are laid
// over one another so that each adder keeps one operand fixed and takes the
// other through a small multiplexer; the factors 2 and 1/2 are wiring (a shift),
// and "x/2" is an arithmetic right shift by one as in the H.264 inverse
// transform.
//
//   first column                       second column
//   s0 = X0 + (FWD/HAD ? X3 : X2)      A = s0 + s1
//   s1 = X1 + (FWD/HAD ? X2 : X3/2)    B = s0 - s1
//   s2 = (FWD/HAD ? X1 : X1/2) - (FWD/HAD ? X2 : X3)
//   s3 = X0 - (FWD/HAD ? X3 : X2)      C = (FWD ? 2*s3 : s3) + s2
//                                      D = s3 - (FWD ? 2*s2 : s2)
//   FWD/HAD: Y = (A, C, B, D)          INV: Y = (A, C, D, B)
//
// The operand multiplexers and the inverse mode's output swap are this
// design's own mapping of the overlapped data flow; the butterflies themselves
// and the factors on X1/X3 (1 or 1/2) and on the second-column cross terms
// (2 or 1) follow the published architecture. Purely combinational; all sums are W bits
// and wrap modulo 2^W, so inputs must respect the dynamic range of the chosen
// transform. A select code outside xform_t computes the forward transform.
module tx_1d
  import tx_pkg::*;
#(
  parameter int unsigned W = TX_W
) (
  input  xform_t               mode,
  input  logic signed [W-1:0]  x [4],
  output logic signed [W-1:0]  y [4]
);

  logic signed [W-1:0] s0, s1, s2, s3;
  logic signed [W-1:0] a, b, c, d;
  logic                inv, fwd;

  always_comb begin
    inv = (mode == XF_INV);
    fwd = !(mode == XF_INV) && !(mode == XF_HAD);

    // first butterfly column
    s0 = x[0] + (inv ? x[2] : x[3]);
    s1 = x[1] + (inv ? (x[3] >>> 1) : x[2]);
    s2 = (inv ? (x[1] >>> 1) : x[1]) - (inv ? x[3] : x[2]);
    s3 = x[0] - (inv ? x[2] : x[3]);

    // second butterfly column; the factor 2 is removed for Hadamard / inverse
    a = s0 + s1;
    b = s0 - s1;
    c = (fwd ? (s3 <<< 1) : s3) + s2;
    d = s3 - (fwd ? (s2 <<< 1) : s2);

    y[0] = a;
    y[1] = c;
    y[2] = inv ? d : b;
    y[3] = inv ? b : d;
  end

endmodule

// tx_mt4x4 - parallel 4x4 multiple-function 2D transform processor for H.264.
//
// One processor for all three 4x4 transforms of H.264 residual coding: the
// forward integer transform, the inverse integer transform and the Hadamard
// transform of the luma DC block. A 4x4 block arrives as four rows, one row of
// four 16-bit samples per cycle, and leaves as four columns of the transformed
// block, one per cycle, so the processor sustains four samples per clock.
//
//   din --> tx_1d (rows) --> tx_transpose (4x4 registers) --> tx_1d (columns)
//       --> tx_round (inverse only) --> dout
//   de/mode --> tx_ctrl (counter, NOP, 4-stage valid/mode chain) --> oe/out_mode
//
// The first 1D unit transforms each incoming row in the cycle it arrives and
// writes it into the transpose array. The array alternates between shifting
// down and shifting left every four valid rows, so while one block's columns
// leave on one side the next block's rows enter on the other. The second 1D
// unit transforms each leaving column; for the inverse transform the output
// stage then applies (x + 32) >> 6.
//
// Interface: din and dout are 64 bits, sample i in bits [16*i +: 16], two's
// complement. Present a row with de = 1 and its transform in mode; all four rows
// of a block must carry the same mode, but consecutive blocks may differ. For
// input row k (k = 0..3) of block X, output k is column k of the result:
//   XF_FWD  Y = T X T',            T  the forward matrix
//   XF_HAD  Y = H X H',            H  the Hadamard matrix (no scaling)
//   XF_INV  Y = (Ti X Ti' + 32) >> 6, Ti the inverse matrix, shifts as in H.264
// computed modulo 2^16, so inputs must stay inside each transform's range
// (forward: 9-bit residuals; inverse and Hadamard: small enough that the
// 16-bit intermediate values do not wrap).
//
// Timing: fixed latency of four cycles; a row accepted in cycle t produces an
// output column with oe = 1 in cycle t+4 (dout is combinational from the array
// registers). If de drops in the middle of a block the whole pipeline holds
// for that cycle (a stall, oe = 0). If de is low between blocks the last block
// still drains out. out_mode gives the transform of the column on dout.
// Synchronous active-low reset clears the control state; data registers are
// not reset. The structure follows the published architecture; the port naming, the
// bit packing, the reset and the select encoding are this design's own.
module tx_mt4x4
  import tx_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              de,        // data enable: din holds a valid row
  input  xform_t            mode,      // transform selection bits of the row
  input  logic [4*TX_W-1:0] din,       // four samples of one row
  output logic              oe,        // output enable: dout holds a valid column
  output xform_t            out_mode,  // transform applied to dout
  output logic [4*TX_W-1:0] dout       // four samples of one result column
);

  logic signed [TX_W-1:0] x_in   [4];
  logic signed [TX_W-1:0] row_tx [4];
  logic signed [TX_W-1:0] col_in [4];
  logic signed [TX_W-1:0] col_tx [4];
  logic signed [TX_W-1:0] res    [4];

  logic   nop, dir_left;
  xform_t mode2;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      x_in[i]                  = din[TX_W*i +: TX_W];
      dout[TX_W*i +: TX_W]     = res[i];
    end
  end

  tx_ctrl u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .de       (de),
    .mode_in  (mode),
    .nop      (nop),
    .dir_left (dir_left),
    .oe       (oe),
    .mode_out (mode2)
  );

  tx_1d #(.W(TX_W)) u_row_1d (
    .mode (mode),
    .x    (x_in),
    .y    (row_tx)
  );

  tx_transpose #(.W(TX_W)) u_transpose (
    .clk      (clk),
    .hold     (nop),
    .dir_left (dir_left),
    .d        (row_tx),
    .q        (col_in)
  );

  tx_1d #(.W(TX_W)) u_col_1d (
    .mode (mode2),
    .x    (col_in),
    .y    (col_tx)
  );

  tx_round #(.W(TX_W)) u_round (
    .mode (mode2),
    .y    (col_tx),
    .z    (res)
  );

  assign out_mode = mode2;

endmodule

// tx_ded4x4 - dedicated (single-transform) parallel 4x4 2D transform processor.
//
// The same architecture as tx_mt4x4, built for one transform only, with every
// stage sized to that transform's dynamic range instead of a common 16 bits:
//
//   din (4 x IN_W) -> 1D unit -> transpose array (ARR_W) -> 1D unit
//     -> [inverse only: (x+32)>>6] -> dout (4 x OUT_W)
//
// KIND picks the 1D units: tx_fwd_1d, tx_inv_1d or tx_had_1d. The widths that
// go with each, from the bit-width analysis of the architecture:
//   XF_FWD  IN_W = 9  (residuals)         ARR_W = 12  OUT_W = 15
//   XF_INV  IN_W = 15 (dequantised coef.) ARR_W = 16  OUT_W = 16
//   XF_HAD  IN_W = 14 (quantised DC)      ARR_W = 16  OUT_W = 18
// The forward widths and the inverse/Hadamard input and array widths follow
// the published architecture; OUT_W = 16 for the inverse (H.264's 16-bit arithmetic)
// and OUT_W = 18 for the Hadamard (two more bits for the second pass) are this
// design's reading of it. For the inverse the output is the rounded, shifted
// value, sign-extended to OUT_W.
//
// Control is tx_ctrl with the transform select tied to KIND: rows enter with
// de, a stall happens when de drops inside a block, the last block drains in
// idle time, and oe marks valid columns. Timing: a row accepted in cycle t
// gives an output column in cycle t+4 (plus any stall cycles); dout is
// combinational from the array registers. Interface packing as in tx_mt4x4:
// sample i in bits [i*W +: W], output k of a block is column k of the result.
module tx_ded4x4
  import tx_pkg::*;
#(
  parameter xform_t      KIND  = XF_FWD,
  parameter int unsigned IN_W  = 9,
  parameter int unsigned ARR_W = 12,
  parameter int unsigned OUT_W = 15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               de,
  input  logic [4*IN_W-1:0]  din,
  output logic               oe,
  output logic [4*OUT_W-1:0] dout
);

  logic signed [IN_W-1:0]  x_in   [4];
  logic signed [ARR_W-1:0] row_tx [4];
  logic signed [ARR_W-1:0] col_in [4];
  logic signed [OUT_W-1:0] col_tx [4];
  logic signed [OUT_W-1:0] res    [4];

  logic   nop, dir_left;
  xform_t mode2;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      x_in[i]                 = din[IN_W*i +: IN_W];
      dout[OUT_W*i +: OUT_W]  = res[i];
    end
  end

  tx_ctrl u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .de       (de),
    .mode_in  (KIND),
    .nop      (nop),
    .dir_left (dir_left),
    .oe       (oe),
    .mode_out (mode2)
  );

  tx_transpose #(.W(ARR_W)) u_transpose (
    .clk      (clk),
    .hold     (nop),
    .dir_left (dir_left),
    .d        (row_tx),
    .q        (col_in)
  );

  if (KIND == XF_INV) begin : g_inv
    tx_inv_1d #(.IW(IN_W),  .OW(ARR_W)) u_row_1d (.x(x_in),   .y(row_tx));
    tx_inv_1d #(.IW(ARR_W), .OW(OUT_W)) u_col_1d (.x(col_in), .y(col_tx));
    tx_round  #(.W(OUT_W))              u_round  (.mode(mode2), .y(col_tx), .z(res));
  end else if (KIND == XF_HAD) begin : g_had
    tx_had_1d #(.IW(IN_W),  .OW(ARR_W)) u_row_1d (.x(x_in),   .y(row_tx));
    tx_had_1d #(.IW(ARR_W), .OW(OUT_W)) u_col_1d (.x(col_in), .y(col_tx));
    assign res = col_tx;
  end else begin : g_fwd
    tx_fwd_1d #(.IW(IN_W),  .OW(ARR_W)) u_row_1d (.x(x_in),   .y(row_tx));
    tx_fwd_1d #(.IW(ARR_W), .OW(OUT_W)) u_col_1d (.x(col_in), .y(col_tx));
    assign res = col_tx;
  end

  // The controller's transform chain can only ever carry KIND.
  a_kind: assert property (@(posedge clk) disable iff (!rst_n) oe |-> mode2 == KIND)
    else $error("tx_ded4x4: output transform differs from KIND");

endmodule

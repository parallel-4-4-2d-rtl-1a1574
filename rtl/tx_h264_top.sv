// tx_h264_top - the parallel 4x4 transform processors for H.264, side by side.
//
// Four independent processors of the same architecture (a 1D unit, a 4x4
// transpose register array with directional transfers, a second 1D unit):
//   mt_*   tx_mt4x4, the multiple-function processor: forward, inverse and
//          Hadamard selectable per block, 16 bits throughout, 64-bit ports;
//   fwd_*  tx_ded4x4 for the forward transform only   (9 -> 12 -> 15 bits);
//   inv_*  tx_ded4x4 for the inverse transform only   (15 -> 16 -> 16 bits);
//   had_*  tx_ded4x4 for the Hadamard transform only  (14 -> 16 -> 18 bits).
// They share only the clock and the synchronous active-low reset. Each takes a
// row of four samples per cycle with its de, and returns one column of the
// transformed block per cycle with its oe, four cycles later (longer by any
// stall cycles). A system normally uses either the multiple-function processor
// or the dedicated ones; both are here so either can be taken as they are.
// Sample i of a row or column sits in bits [i*W +: W] of its port.
module tx_h264_top
  import tx_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // multiple-function processor
  input  logic          mt_de,
  input  xform_t        mt_mode,
  input  logic [63:0]   mt_din,
  output logic          mt_oe,
  output xform_t        mt_out_mode,
  output logic [63:0]   mt_dout,
  // dedicated forward transform
  input  logic          fwd_de,
  input  logic [35:0]   fwd_din,
  output logic          fwd_oe,
  output logic [59:0]   fwd_dout,
  // dedicated inverse transform
  input  logic          inv_de,
  input  logic [59:0]   inv_din,
  output logic          inv_oe,
  output logic [63:0]   inv_dout,
  // dedicated Hadamard transform
  input  logic          had_de,
  input  logic [55:0]   had_din,
  output logic          had_oe,
  output logic [71:0]   had_dout
);

  tx_mt4x4 u_mt (
    .clk      (clk),
    .rst_n    (rst_n),
    .de       (mt_de),
    .mode     (mt_mode),
    .din      (mt_din),
    .oe       (mt_oe),
    .out_mode (mt_out_mode),
    .dout     (mt_dout)
  );

  tx_ded4x4 #(.KIND(XF_FWD), .IN_W(9), .ARR_W(12), .OUT_W(15)) u_fwd (
    .clk (clk), .rst_n (rst_n), .de (fwd_de), .din (fwd_din), .oe (fwd_oe), .dout (fwd_dout)
  );

  tx_ded4x4 #(.KIND(XF_INV), .IN_W(15), .ARR_W(16), .OUT_W(16)) u_inv (
    .clk (clk), .rst_n (rst_n), .de (inv_de), .din (inv_din), .oe (inv_oe), .dout (inv_dout)
  );

  tx_ded4x4 #(.KIND(XF_HAD), .IN_W(14), .ARR_W(16), .OUT_W(18)) u_had (
    .clk (clk), .rst_n (rst_n), .de (had_de), .din (had_din), .oe (had_oe), .dout (had_dout)
  );

endmodule

// tx_pkg - types and constants shared by the 4x4 multiple-transform processor.
//
// The processor computes the three 4x4 transforms of H.264 residual coding
// (forward integer transform, inverse integer transform, 4x4 Hadamard) on one
// datapath. Every arithmetic unit and register in it is TX_W = 16 bits wide,
// the width the design is specified with; four samples travel side by side, so
// a data port is 4 x 16 = 64 bits.
//
// The two-bit transform-select code (xform_t) is this design's own encoding.
package tx_pkg;

  // Width of every sample, adder and register in the datapath.
  localparam int unsigned TX_W = 16;

  // Transform selection bits that travel with each input row.
  typedef enum logic [1:0] {
    XF_FWD = 2'd0,  // forward 4x4 integer transform (residual blocks)
    XF_INV = 2'd1,  // inverse 4x4 integer transform, with (x+32)>>6 output stage
    XF_HAD = 2'd2   // 4x4 Hadamard transform (luma DC in 16x16 intra mode)
  } xform_t;

  // What travels beside the data through the four-stage control chain: the
  // input's data-enable and the transform it selected.
  typedef struct packed {
    logic   valid;
    xform_t mode;
  } tag_t;

endpackage

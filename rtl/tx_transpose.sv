// tx_transpose - 4x4 transpose register array with directional transfers.
//
// Sixteen tx_cell elements, rg[r][c] with row 0 at the top and column 0 at the
// left. All cells move together in one direction:
//   shift down (dir_left = 0): the incoming vector enters the top row,
//       element j into column j; the bottom row leaves the array.
//   shift left (dir_left = 1): the incoming vector enters the right column,
//       element j into row 3-j; the left column leaves the array.
//   hold (hold = 1): nothing moves.
// Four vectors written in one direction are read back, in the other direction,
// as the four columns of the 4x4 block they form, so alternating the direction
// every four vectors transposes a stream of blocks with no gap between blocks.
//
// The leaving vector `q` is what the four output multiplexers choose: the bottom
// row (element i = rg[3][i]) while shifting down, the left column (element
// i = rg[3-i][0]) while shifting left. `q` is combinational from the cells;
// `d` is loaded on the rising edge. The transfer scheme follows the
// published architecture; which element of a vector lands in which cell is this
// design's own choice, made so that the block is transposed in order.
module tx_transpose #(
  parameter int unsigned W = tx_pkg::TX_W
) (
  input  logic                clk,
  input  logic                hold,
  input  logic                dir_left,
  input  logic signed [W-1:0] d [4],
  output logic signed [W-1:0] q [4]
);

  logic signed [W-1:0] rg       [4][4];
  logic signed [W-1:0] up_in    [4][4];
  logic signed [W-1:0] right_in [4][4];

  // neighbour wiring: the top row is fed from d, the right column from d reversed
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        up_in[r][c]    = (r == 0) ? d[c]     : rg[r-1][c];
        right_in[r][c] = (c == 3) ? d[3 - r] : rg[r][c+1];
      end
    end
  end

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      tx_cell #(.W(W)) u_cell (
        .clk        (clk),
        .hold       (hold),
        .dir_left   (dir_left),
        .from_up    (up_in[r][c]),
        .from_right (right_in[r][c]),
        .q          (rg[r][c])
      );
    end
  end

  // output multiplexers: bottom row or left column
  always_comb begin
    for (int i = 0; i < 4; i++)
      q[i] = dir_left ? rg[3 - i][0] : rg[3][i];
  end

endmodule

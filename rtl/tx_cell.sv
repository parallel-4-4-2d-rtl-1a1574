// tx_cell - one element of the transpose register array.
//
// A W-bit register behind a three-input multiplexer. The inputs are the
// register's own output (hold, used while the array waits in the middle of a
// block), the element above it (the array shifts down) and the element to its
// right (the array shifts left). `hold` wins over `dir_left`. The register
// loads on the rising clock edge; it has no reset, since nothing reads a cell
// before the valid flags travelling beside the array say its data is good.
module tx_cell #(
  parameter int unsigned W = tx_pkg::TX_W
) (
  input  logic                clk,
  input  logic                hold,      // keep the stored value (NOP)
  input  logic                dir_left,  // 1: take from the right, 0: from above
  input  logic signed [W-1:0] from_up,
  input  logic signed [W-1:0] from_right,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (hold)          q <= q;
    else if (dir_left) q <= from_right;
    else               q <= from_up;
  end

endmodule

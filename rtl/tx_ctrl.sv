// tx_ctrl - direction counter, stall detection and valid/configuration chain.
//
// A two-bit counter counts valid input rows (de = 1). Every fourth valid row it
// flips the direction of the transpose array, so each block is written in one
// direction and read out in the other. If de is low while the counter is not
// zero, a block has been interrupted: `nop` is raised and the array, the chain
// and the counter all hold (a stall cycle). If de is low between blocks
// (counter at zero) nothing holds: the array keeps shifting so that the last
// block still drains out, and invalid rows follow it in.
//
// Beside the array runs a four-stage chain of hold-or-shift registers carrying
// each row's de and transform select (tag_t). Its last stage says whether the
// vector now leaving the array is valid (oe) and which transform the second 1D
// unit must apply to it, so the two 1D units may work on different transforms
// in the same cycle. oe is low during a stall.
//
// Timing: a row presented with de in cycle t leaves the array, as a column of
// its block, in cycle t+4 if no stall intervenes. Synchronous active-low reset
// clears the counter, the direction (shift down) and the valid flags.
// The counter, the NOP rule and the preserved de/configuration bits follow the
// published architecture; the reset, holding oe low in a stall and the rule
// that a block keeps one transform (checked by an assertion) are this design's.
module tx_ctrl
  import tx_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   de,        // input row valid
  input  xform_t mode_in,   // transform of the input row
  output logic   nop,       // hold everything this cycle
  output logic   dir_left,  // 0: array shifts down, 1: array shifts left
  output logic   oe,        // the vector leaving the array is valid
  output xform_t mode_out   // transform for the second 1D unit and output stage
);

  logic [1:0] cnt;
  tag_t       chain [4];

  assign nop      = (cnt != 2'd0) && !de;
  assign oe       = chain[3].valid && !nop;
  assign mode_out = chain[3].mode;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= 2'd0;
      dir_left <= 1'b0;
      for (int i = 0; i < 4; i++) chain[i] <= '{valid: 1'b0, mode: XF_FWD};
    end else begin
      if (de) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) dir_left <= !dir_left;
      end
      if (!nop) begin
        chain[0] <= '{valid: de, mode: mode_in};
        for (int i = 1; i < 4; i++) chain[i] <= chain[i-1];
      end
    end
  end

  // The four rows of a block must select the same transform.
  property p_mode_stable;
    @(posedge clk) disable iff (!rst_n)
      (de && cnt != 2'd0) |-> (mode_in == chain[0].mode);
  endproperty
  a_mode_stable: assert property (p_mode_stable)
    else $error("tx_ctrl: transform select changed inside a block");

endmodule

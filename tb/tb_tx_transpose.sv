// tb_tx_transpose - self-checking test of the 4x4 transpose register array.
//
// Writes a stream of random 4x4 blocks, one row per cycle, switching the
// transfer direction after every four rows as the controller does, and checks
// that while each block is being replaced by the next the array delivers that
// block's columns 0..3 in order. Also checks that hold freezes the array in
// the middle of a block and that a block still comes out when no new block
// follows it (only invalid rows enter behind it).
module tb_tx_transpose;
  localparam int W = 16;

  logic                clk = 1'b0;
  logic                hold, dir_left;
  logic signed [W-1:0] d [4];
  logic signed [W-1:0] q [4];

  int checks = 0, failures = 0;
  int n_hold = 0;

  tx_transpose #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  typedef logic signed [W-1:0] blk_t [4][4];
  blk_t prev, cur;
  logic have_prev;

  // check that q shows column k of prev
  task automatic check_col(int k);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (q[i] !== prev[i][k]) begin
        failures++;
        $display("FAIL: column %0d element %0d: %0d expected %0d", k, i, q[i], prev[i][k]);
      end
    end
  endtask

  initial begin
    hold = 1'b0; dir_left = 1'b0; have_prev = 1'b0;
    foreach (d[i]) d[i] = '0;
    for (int blk = 0; blk < 200; blk++) begin
      foreach (cur[r, c]) cur[r][c] = W'($urandom);
      for (int r = 0; r < 4; r++) begin
        // an occasional hold cycle inside a block
        if (r != 0 && ($urandom % 5) == 0) begin
          hold = 1'b1;
          foreach (d[i]) d[i] = W'($urandom);
          #1;
          if (have_prev) check_col(r);
          @(posedge clk); #1;
          if (have_prev) check_col(r);
          hold = 1'b0;
          n_hold++;
        end
        foreach (d[i]) d[i] = cur[r][i];
        #1;
        if (have_prev) check_col(r);
        @(posedge clk); #1;
      end
      prev = cur;
      have_prev = 1'b1;
      dir_left = !dir_left;
    end
    // the last block drains with nothing valid behind it
    for (int r = 0; r < 4; r++) begin
      foreach (d[i]) d[i] = W'($urandom);
      #1;
      check_col(r);
      @(posedge clk); #1;
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

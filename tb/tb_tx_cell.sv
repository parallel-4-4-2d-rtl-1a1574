// tb_tx_cell - self-checking test of one transpose register element.
//
// Drives random data on both neighbour inputs and random hold / direction
// controls; after each rising edge the register must hold its old value when
// hold = 1, else take from_right when dir_left = 1, else from_up. A model
// register kept here gives the expected value.
module tb_tx_cell;
  localparam int W = 16;

  logic                clk = 1'b0;
  logic                hold, dir_left;
  logic signed [W-1:0] from_up, from_right, q;
  logic signed [W-1:0] model;

  int checks = 0, failures = 0;
  int n_hold = 0, n_up = 0, n_right = 0;

  tx_cell #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    // load a known value first
    hold = 1'b0; dir_left = 1'b0; from_up = 16'sd1234; from_right = -16'sd7;
    @(posedge clk); #1;
    model = 16'sd1234;
    for (int i = 0; i < 2000; i++) begin
      hold       = ($urandom % 4) == 0;
      dir_left   = $urandom % 2;
      from_up    = W'($urandom);
      from_right = W'($urandom);
      @(posedge clk); #1;
      if (hold)          begin n_hold++;  end
      else if (dir_left) begin n_right++; model = from_right; end
      else               begin n_up++;    model = from_up;    end
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d: hold=%0b left=%0b q=%0d expected %0d", i, hold, dir_left, q, model);
      end
    end
    checks++;
    if (n_hold == 0 || n_up == 0 || n_right == 0) failures++;
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

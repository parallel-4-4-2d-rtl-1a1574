// tb_tx_ctrl - self-checking test of the direction counter, stall rule and
// valid/configuration chain.
//
// Feeds random blocks of four valid rows (one transform per block) with random
// stall cycles inside blocks and idle cycles between them. Expected values come
// from the row stream itself: the direction is the parity of the number of
// complete blocks accepted, a stall is a de = 0 cycle in the middle of a block,
// and, counting only non-stall cycles, oe and out_mode repeat de and mode of
// four such cycles earlier (oe is low in a stall).
module tb_tx_ctrl;
  import tx_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   de;
  xform_t mode_in;
  logic   nop, dir_left, oe;
  xform_t mode_out;

  int checks = 0, failures = 0;
  int n_stall = 0, n_idle = 0, n_oe = 0;

  tx_ctrl dut (.*);

  always #5 clk = ~clk;

  int     rows = 0;          // valid rows accepted so far
  logic   hist_de   [$];     // de of every non-stall cycle, newest last
  xform_t hist_mode [$];

  // compare just before the edge, then record what the edge will accept
  always @(negedge clk) if (rst_n) begin
    logic   e_nop, e_oe, e_dir;
    xform_t e_mode;
    int     n;
    e_nop = (rows % 4 != 0) && !de;
    e_dir = ((rows / 4) % 2) == 1;
    n     = hist_de.size();
    e_oe  = (n >= 4) ? (hist_de[n-4] && !e_nop) : 1'b0;
    e_mode = (n >= 4) ? hist_mode[n-4] : XF_FWD;
    checks += 3;
    if (nop !== e_nop)      begin failures++; $display("FAIL: nop %0b expected %0b", nop, e_nop); end
    if (dir_left !== e_dir) begin failures++; $display("FAIL: dir %0b expected %0b", dir_left, e_dir); end
    if (oe !== e_oe)        begin failures++; $display("FAIL: oe %0b expected %0b", oe, e_oe); end
    if (e_oe) begin
      checks++;
      n_oe++;
      if (mode_out !== e_mode) begin failures++; $display("FAIL: mode_out %0d expected %0d", mode_out, e_mode); end
    end
    if (e_nop) n_stall++;
    else begin
      hist_de.push_back(de);
      hist_mode.push_back(mode_in);
    end
    if (de) rows++;
  end

  task automatic cyc(logic v, xform_t m);
    de      <= v;
    mode_in <= m;
    @(posedge clk);
  endtask

  initial begin
    xform_t m;
    rst_n = 1'b0; de = 1'b0; mode_in = XF_FWD;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < 400; b++) begin
      m = xform_t'($urandom % 3);
      for (int r = 0; r < 4; r++) begin
        if (r != 0 && ($urandom % 5) == 0) cyc(1'b0, m);
        cyc(1'b1, m);
      end
      if (($urandom % 4) == 0) begin
        n_idle++;
        repeat (1 + $urandom % 5) cyc(1'b0, xform_t'($urandom % 3));
      end
    end
    repeat (6) cyc(1'b0, XF_FWD);
    checks++;
    if (n_stall == 0 || n_idle == 0 || n_oe != 1600) begin
      failures++;
      $display("FAIL: stalls %0d idle gaps %0d outputs %0d (expected 1600)", n_stall, n_idle, n_oe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

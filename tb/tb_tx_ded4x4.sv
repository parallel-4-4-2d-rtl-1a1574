// tb_tx_ded4x4 - self-checking test of the dedicated transform processor in its
// three configurations: forward (9/12/15 bits), inverse (15/16/16 bits) and
// Hadamard (14/16/18 bits).
//
// Each instance gets its own tb_tx_agent: a directed block, 16 blocks back to
// back (four samples per cycle, 64 columns in 64 cycles), then random blocks
// with stalls and idle gaps; every column is checked for data and the
// four-cycle latency. Inputs: forward over the full 9-bit residual range,
// Hadamard over the full 14-bit range (the 18-bit output holds every result),
// inverse within -2048..2047 (exact in 16 bits). The test also fails if a
// stall, a drain across a gap or readout in either direction never happened
// for an instance.
module tb_tx_ded4x4;
  import tx_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam xform_t KINDS [3] = '{XF_FWD, XF_INV, XF_HAD};

  logic   done   [3];
  int     chk    [3], fail [3];
  int     stl    [3], drn [3], d0 [3], d1 [3], mix [3], rnd [3], byp [3];
  int     nm     [3][3];

  // forward
  logic          f_de, f_oe;  xform_t f_mode;
  logic [35:0]   f_din;       logic [59:0] f_dout;
  tx_ded4x4 #(.KIND(XF_FWD), .IN_W(9), .ARR_W(12), .OUT_W(15)) u_fwd (
    .clk, .rst_n, .de(f_de), .din(f_din), .oe(f_oe), .dout(f_dout));
  tb_tx_agent #(.MULTI(1'b0), .KIND(XF_FWD), .IN_W(9), .OUT_W(15), .NBLK(200),
                .LIM_FWD(256)) a_fwd (
    .clk, .rst_n, .de(f_de), .mode(f_mode), .din(f_din), .oe(f_oe), .out_mode(XF_FWD),
    .dout(f_dout), .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_stall(stl[0]),
    .n_drain(drn[0]), .n_dir0(d0[0]), .n_dir1(d1[0]), .n_mixed(mix[0]), .n_round(rnd[0]),
    .n_bypass(byp[0]), .n_mode(nm[0]));

  // inverse
  logic          i_de, i_oe;  xform_t i_mode;
  logic [59:0]   i_din;       logic [63:0] i_dout;
  tx_ded4x4 #(.KIND(XF_INV), .IN_W(15), .ARR_W(16), .OUT_W(16)) u_inv (
    .clk, .rst_n, .de(i_de), .din(i_din), .oe(i_oe), .dout(i_dout));
  tb_tx_agent #(.MULTI(1'b0), .KIND(XF_INV), .IN_W(15), .OUT_W(16), .NBLK(200),
                .LIM_INV(2048)) a_inv (
    .clk, .rst_n, .de(i_de), .mode(i_mode), .din(i_din), .oe(i_oe), .out_mode(XF_INV),
    .dout(i_dout), .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_stall(stl[1]),
    .n_drain(drn[1]), .n_dir0(d0[1]), .n_dir1(d1[1]), .n_mixed(mix[1]), .n_round(rnd[1]),
    .n_bypass(byp[1]), .n_mode(nm[1]));

  // Hadamard
  logic          h_de, h_oe;  xform_t h_mode;
  logic [55:0]   h_din;       logic [71:0] h_dout;
  tx_ded4x4 #(.KIND(XF_HAD), .IN_W(14), .ARR_W(16), .OUT_W(18)) u_had (
    .clk, .rst_n, .de(h_de), .din(h_din), .oe(h_oe), .dout(h_dout));
  tb_tx_agent #(.MULTI(1'b0), .KIND(XF_HAD), .IN_W(14), .OUT_W(18), .NBLK(200),
                .LIM_HAD(8192)) a_had (
    .clk, .rst_n, .de(h_de), .mode(h_mode), .din(h_din), .oe(h_oe), .out_mode(XF_HAD),
    .dout(h_dout), .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_stall(stl[2]),
    .n_drain(drn[2]), .n_dir0(d0[2]), .n_dir1(d1[2]), .n_mixed(mix[2]), .n_round(rnd[2]),
    .n_bypass(byp[2]), .n_mode(nm[2]));

  int checks, failures;

  task automatic finish();
    checks = 0; failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks   += chk[i] + 5;
      failures += fail[i];
      $display("%s: checks=%0d failures=%0d stalls=%0d drains=%0d dir_down=%0d dir_left=%0d blocks=%0d",
               KINDS[i].name(), chk[i], fail[i], stl[i], drn[i], d0[i], d1[i], nm[i][KINDS[i]]);
      if (!done[i])            begin failures++; $display("FAIL: %s traffic did not finish", KINDS[i].name()); end
      if (stl[i] == 0)         begin failures++; $display("FAIL: %s never stalled", KINDS[i].name()); end
      if (drn[i] == 0)         begin failures++; $display("FAIL: %s never drained across a gap", KINDS[i].name()); end
      if (d0[i] == 0 || d1[i] == 0) begin failures++; $display("FAIL: %s used one direction only", KINDS[i].name()); end
      if ((i == 1) ? rnd[i] == 0 : byp[i] == 0) begin failures++; $display("FAIL: %s output stage not exercised", KINDS[i].name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2]);
    @(posedge clk);
    finish();
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    finish();
    // finish() counts the unfinished agents as failures
  end
endmodule

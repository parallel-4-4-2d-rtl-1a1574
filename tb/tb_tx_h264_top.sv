// tb_tx_h264_top - end-to-end test of all four transform processors at once.
//
// Instantiates tx_h264_top as it is (no parameter changes) and gives each of
// its four processors its own tb_tx_agent, all running at the same time:
//   mt   the multiple-function processor, a random transform per block
//        (forward on 9-bit residuals, inverse and Hadamard within 12 bits);
//   fwd  forward only, full 9-bit range;
//   inv  inverse only, within -2048..2047;
//   had  Hadamard only, full 14-bit range.
// Every output column is checked for data, transform and the four-cycle
// latency. Each agent sends a directed block, 16 blocks back to back (64
// columns must leave in 64 consecutive cycles), then random blocks with stalls
// and idle gaps. The test counts, per processor, how often each mechanism
// happened and fails for any that never did: stall, drain across an idle gap,
// readout shifting down and shifting left, the inverse rounding stage, the
// bypass of that stage, and (multiple-function processor) the two 1D units
// running different transforms in the same cycle.
module tb_tx_h264_top;
  import tx_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        mt_de, mt_oe;   xform_t mt_mode, mt_out_mode;
  logic [63:0] mt_din, mt_dout;
  logic        fwd_de, fwd_oe; xform_t fwd_mode;
  logic [35:0] fwd_din;        logic [59:0] fwd_dout;
  logic        inv_de, inv_oe; xform_t inv_mode;
  logic [59:0] inv_din;        logic [63:0] inv_dout;
  logic        had_de, had_oe; xform_t had_mode;
  logic [55:0] had_din;        logic [71:0] had_dout;

  tx_h264_top dut (
    .clk, .rst_n,
    .mt_de, .mt_mode, .mt_din, .mt_oe, .mt_out_mode, .mt_dout,
    .fwd_de, .fwd_din, .fwd_oe, .fwd_dout,
    .inv_de, .inv_din, .inv_oe, .inv_dout,
    .had_de, .had_din, .had_oe, .had_dout
  );

  localparam string NAME [4] = '{"multi", "forward", "inverse", "hadamard"};

  logic done [4];
  int   chk [4], fail [4], stl [4], drn [4], d0 [4], d1 [4], mix [4], rnd [4], byp [4];
  int   nm  [4][3];

  tb_tx_agent #(.MULTI(1'b1), .IN_W(16), .OUT_W(16), .NBLK(300),
                .LIM_FWD(256), .LIM_INV(2048), .LIM_HAD(2048)) a_mt (
    .clk, .rst_n, .de(mt_de), .mode(mt_mode), .din(mt_din), .oe(mt_oe),
    .out_mode(mt_out_mode), .dout(mt_dout), .done(done[0]), .checks(chk[0]),
    .failures(fail[0]), .n_stall(stl[0]), .n_drain(drn[0]), .n_dir0(d0[0]), .n_dir1(d1[0]),
    .n_mixed(mix[0]), .n_round(rnd[0]), .n_bypass(byp[0]), .n_mode(nm[0]));

  tb_tx_agent #(.MULTI(1'b0), .KIND(XF_FWD), .IN_W(9), .OUT_W(15), .NBLK(200),
                .LIM_FWD(256)) a_fwd (
    .clk, .rst_n, .de(fwd_de), .mode(fwd_mode), .din(fwd_din), .oe(fwd_oe),
    .out_mode(XF_FWD), .dout(fwd_dout), .done(done[1]), .checks(chk[1]),
    .failures(fail[1]), .n_stall(stl[1]), .n_drain(drn[1]), .n_dir0(d0[1]), .n_dir1(d1[1]),
    .n_mixed(mix[1]), .n_round(rnd[1]), .n_bypass(byp[1]), .n_mode(nm[1]));

  tb_tx_agent #(.MULTI(1'b0), .KIND(XF_INV), .IN_W(15), .OUT_W(16), .NBLK(200),
                .LIM_INV(2048)) a_inv (
    .clk, .rst_n, .de(inv_de), .mode(inv_mode), .din(inv_din), .oe(inv_oe),
    .out_mode(XF_INV), .dout(inv_dout), .done(done[2]), .checks(chk[2]),
    .failures(fail[2]), .n_stall(stl[2]), .n_drain(drn[2]), .n_dir0(d0[2]), .n_dir1(d1[2]),
    .n_mixed(mix[2]), .n_round(rnd[2]), .n_bypass(byp[2]), .n_mode(nm[2]));

  tb_tx_agent #(.MULTI(1'b0), .KIND(XF_HAD), .IN_W(14), .OUT_W(18), .NBLK(200),
                .LIM_HAD(8192)) a_had (
    .clk, .rst_n, .de(had_de), .mode(had_mode), .din(had_din), .oe(had_oe),
    .out_mode(XF_HAD), .dout(had_dout), .done(done[3]), .checks(chk[3]),
    .failures(fail[3]), .n_stall(stl[3]), .n_drain(drn[3]), .n_dir0(d0[3]), .n_dir1(d1[3]),
    .n_mixed(mix[3]), .n_round(rnd[3]), .n_bypass(byp[3]), .n_mode(nm[3]));

  int checks, failures;

  task automatic need(bit ok, string what, int i);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s: %s never happened", NAME[i], what);
    end
  endtask

  task automatic finish();
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks   += chk[i];
      failures += fail[i];
      $display("%-8s checks=%0d failures=%0d stalls=%0d drains=%0d dir_down=%0d dir_left=%0d mixed=%0d round=%0d bypass=%0d blocks fwd/inv/had=%0d/%0d/%0d",
               NAME[i], chk[i], fail[i], stl[i], drn[i], d0[i], d1[i], mix[i], rnd[i], byp[i],
               nm[i][0], nm[i][1], nm[i][2]);
      need(done[i], "end of traffic", i);
      need(stl[i] > 0, "stall", i);
      need(drn[i] > 0, "drain across an idle gap", i);
      need(d0[i] > 0, "readout shifting down", i);
      need(d1[i] > 0, "readout shifting left", i);
      if (i == 0 || i == 2) need(rnd[i] > 0, "rounding stage", i);
      if (i != 2)           need(byp[i] > 0, "rounding bypass", i);
    end
    need(mix[0] > 0, "different transforms in the two 1D units", 0);
    for (int m = 0; m < 3; m++) need(nm[0][m] > 0, "each transform", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    @(posedge clk);
    finish();
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog expired");
    finish();  // the unfinished agents count as failures
  end
endmodule

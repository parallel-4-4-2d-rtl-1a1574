// tb_tx_mt4x4 - end-to-end self-checking test of the multiple-transform processor.
//
// Streams 4x4 blocks of all three transforms through tx_mt4x4 at its default
// size and checks every output column against a reference computed here from
// the transform matrices (row pass, column pass, then (x+32)>>6 for the inverse,
// with the inverse matrix's 1/2 factors taken as arithmetic shifts as H.264
// does). Phases:
//   1. a directed forward block of all ones (result: 16 in the DC position);
//   2. 16 blocks back to back: checks four samples per cycle in and out and the
//      fixed four-cycle latency;
//   3. 300 random blocks with random transforms, stalls inside blocks and idle
//      gaps between them.
// Every output's latency is checked: four cycles plus the stall cycles that
// fell between its input and its output. The test counts how often each
// mechanism happened (stall, drain across an idle gap, both transfer
// directions, different transforms in the two 1D units at once, the rounding
// stage used and bypassed) and fails if one never did.
module tb_tx_mt4x4;
  import tx_pkg::*;

  localparam int W = TX_W;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              de;
  xform_t            mode;
  logic [4*W-1:0]    din;
  logic              oe;
  xform_t            out_mode;
  logic [4*W-1:0]    dout;

  int checks = 0, failures = 0;
  int cycle = 0;

  tx_mt4x4 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference model -----------------
  typedef int blk_t [4][4];

  // forward, Hadamard: integer matrices. Inverse: matrix in halves; an entry of
  // +-1 (half) applies to the input shifted right by one.
  function automatic int fwd_m(int r, int c);
    int m [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    return m[r][c];
  endfunction
  function automatic int had_m(int r, int c);
    int m [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    return m[r][c];
  endfunction
  function automatic int inv_m2(int r, int c);  // twice Eq. 2
    int m [4][4] = '{'{2, 2, 2, 1}, '{2, 1, -2, -2}, '{2, -1, -2, 2}, '{2, -2, 2, -1}};
    return m[r][c];
  endfunction

  function automatic void ref_1d(input xform_t md, input int x [4], output int y [4]);
    for (int r = 0; r < 4; r++) begin
      y[r] = 0;
      for (int c = 0; c < 4; c++) begin
        case (md)
          XF_FWD: y[r] += fwd_m(r, c) * x[c];
          XF_HAD: y[r] += had_m(r, c) * x[c];
          default: begin
            int k = inv_m2(r, c);
            if (k == 1 || k == -1) y[r] += k * (x[c] >>> 1);
            else                   y[r] += (k / 2) * x[c];
          end
        endcase
      end
    end
  endfunction

  // result column k of block b, as the processor produces it
  function automatic void ref_2d(input xform_t md, input blk_t b, output blk_t col);
    int mid [4][4];
    int v [4], y [4];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) v[c] = b[r][c];
      ref_1d(md, v, y);
      for (int c = 0; c < 4; c++) mid[r][c] = y[c];
    end
    for (int k = 0; k < 4; k++) begin
      for (int r = 0; r < 4; r++) v[r] = mid[r][k];
      ref_1d(md, v, y);
      for (int r = 0; r < 4; r++) col[k][r] = (md == XF_INV) ? ((y[r] + 32) >>> 6) : y[r];
    end
  endfunction

  // ---------------- scoreboard -----------------
  typedef struct {
    logic [4*W-1:0] data;
    xform_t         md;
    logic           left;   // read out while the array shifts left
  } exp_t;
  exp_t exp_q [$];

  // cycle and stall count at which each row was accepted, in order
  typedef struct {
    int in_cycle;
    int in_stalls;
  } stamp_t;
  stamp_t in_q [$];
  logic   mid_block = 1'b0;  // driver is inside a block (a de = 0 cycle is a stall)

  int stalls_seen = 0;       // stall cycles so far
  int n_stall = 0, n_drain = 0, n_dir0 = 0, n_dir1 = 0, n_mixed = 0;
  int n_round = 0, n_bypass = 0, n_out = 0;
  int n_mode [3] = '{0, 0, 0};
  int range_bad = 0;
  int n_blocks = 0;

  function automatic int rnd_range(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // make the expected columns of a block and queue them
  task automatic expect_block(xform_t md, blk_t b);
    blk_t col;
    exp_t e;
    ref_2d(md, b, col);
    for (int k = 0; k < 4; k++) begin
      for (int r = 0; r < 4; r++) begin
        if (col[k][r] > 32767 || col[k][r] < -32768) range_bad++;
        e.data[W*r +: W] = W'(col[k][r]);
      end
      e.md   = md;
      // blocks are written alternately shifting down and left, starting down,
      // and read out in the other direction
      e.left = (n_blocks % 2) == 0;
      exp_q.push_back(e);
    end
    n_blocks++;
  endtask

  // drive one block; stall_pct: chance of a stall cycle before rows 1..3
  task automatic send_block(xform_t md, blk_t b, int stall_pct);
    expect_block(md, b);
    for (int r = 0; r < 4; r++) begin
      if (r != 0 && int'($urandom % 100) < stall_pct) begin
        de        <= 1'b0;
        mid_block <= 1'b1;
        din       <= {$urandom, $urandom};
        @(posedge clk);
        n_stall++;
      end
      de        <= 1'b1;
      mid_block <= 1'b0;
      mode      <= md;
      for (int c = 0; c < 4; c++) din[W*c +: W] <= W'(b[r][c]);
      @(posedge clk);
    end
    n_mode[md]++;
  endtask

  // n cycles with no input
  task automatic idle(int n);
    repeat (n) begin
      de  <= 1'b0;
      din <= {$urandom, $urandom};
      @(posedge clk);
    end
  endtask

  task automatic rand_block(output xform_t md, output blk_t b);
    int lim;
    md = xform_t'($urandom % 3);
    lim = (md == XF_FWD) ? 256 : 2048;   // 9-bit residuals; 12-bit coefficients
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[r][c] = rnd_range(-lim, lim - 1);
  endtask

  // output timing during the throughput phase
  logic tp_on = 1'b0;
  int   tp_first = -1, tp_last = -1, tp_cnt = 0;
  always @(negedge clk) if (tp_on && oe) begin
    if (tp_first < 0) tp_first = cycle;
    tp_last = cycle;
    tp_cnt++;
  end

  // output checker
  always @(negedge clk) begin
    if (rst_n) begin
      if (de) in_q.push_back('{cycle, stalls_seen});
      if (!de && mid_block) stalls_seen++;
      if (de && oe && mode != out_mode) n_mixed++;
      if (oe) begin
        exp_t   e;
        stamp_t st;
        n_out++;
        if (out_mode == XF_INV) n_round++; else n_bypass++;
        if (!de && exp_q.size() > 0) n_drain++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: output with nothing expected", cycle);
        end else begin
          e  = exp_q.pop_front();
          st = in_q.pop_front();
          if (e.left) n_dir1++; else n_dir0++;
          if (dout !== e.data || out_mode !== e.md) begin
            failures++;
            $display("FAIL cycle %0d: dout %h mode %0d, expected %h mode %0d",
                     cycle, dout, out_mode, e.data, e.md);
          end
          checks++;
          if (cycle - st.in_cycle - (stalls_seen - st.in_stalls) != 4) begin
            failures++;
            $display("FAIL cycle %0d: latency %0d (stalls %0d), expected 4",
                     cycle, cycle - st.in_cycle, stalls_seen - st.in_stalls);
          end
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t   b;
    xform_t md;

    rst_n = 1'b0; de = 1'b0; mode = XF_FWD; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. directed: forward transform of an all-ones block
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) b[r][c] = 1;
    send_block(XF_FWD, b, 0);
    idle(6);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: directed block not drained"); end

    // 2. throughput: 16 blocks back to back
    tp_on = 1'b1;
    for (int i = 0; i < 16; i++) begin
      rand_block(md, b);
      send_block(md, b, 0);
    end
    idle(6);
    checks++;
    // 64 rows in 64 cycles; the 64 columns must leave in 64 consecutive cycles
    if (exp_q.size() != 0 || tp_last - tp_first != 63 || tp_cnt != 64) begin
      failures++;
      $display("FAIL: throughput: outputs from cycle %0d to %0d, %0d of them, %0d left",
               tp_first, tp_last, tp_cnt, exp_q.size());
    end
    tp_on = 1'b0;

    // 3. random traffic
    for (int i = 0; i < 300; i++) begin
      rand_block(md, b);
      send_block(md, b, 20);
      if ($urandom % 100 < 25) idle(int'($urandom % 6));
    end
    idle(8);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d columns never came out", exp_q.size()); end
    checks++;
    if (range_bad != 0) begin failures++; $display("FAIL: %0d reference values outside 16 bits", range_bad); end

    $display("mechanisms: stalls=%0d drains=%0d dir_down=%0d dir_left=%0d mixed_modes=%0d round=%0d bypass=%0d fwd=%0d inv=%0d had=%0d outputs=%0d",
             n_stall, n_drain, n_dir0, n_dir1, n_mixed, n_round, n_bypass,
             n_mode[0], n_mode[1], n_mode[2], n_out);
    foreach (n_mode[i]) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL: transform %0d never used", i); end
    end
    checks += 7;
    if (n_stall  == 0) begin failures++; $display("FAIL: no stall happened"); end
    if (n_drain  == 0) begin failures++; $display("FAIL: no drain across an idle gap"); end
    if (n_dir0   == 0) begin failures++; $display("FAIL: never read out shifting down"); end
    if (n_dir1   == 0) begin failures++; $display("FAIL: never read out shifting left"); end
    if (n_mixed  == 0) begin failures++; $display("FAIL: the two 1D units never ran different transforms"); end
    if (n_round  == 0) begin failures++; $display("FAIL: rounding stage never used"); end
    if (n_bypass == 0) begin failures++; $display("FAIL: rounding stage never bypassed"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tx_agent - stimulus and scoreboard for one 4x4 transform processor port set.
//
// Used by the processor testbenches. Drives de/mode/din and checks every
// output column (data, transform and latency) against a reference computed
// here from the transform matrices: row pass, column pass, then (x+32)>>6 for
// the inverse, with the inverse matrix's 1/2 entries applied to the input
// shifted right by one. Results are compared in OUT_W bits.
//
// Traffic, after reset: one directed all-ones block; 16 blocks back to back,
// whose 64 columns must leave in 64 consecutive cycles; then NBLK random blocks
// with stalls inside blocks and idle gaps between them. MULTI = 1 picks a random
// transform per block; otherwise every block is KIND. Input ranges per
// transform are LIM_FWD/LIM_INV/LIM_HAD (values in -LIM..LIM-1). Latency must be
// four cycles plus the stall cycles in between. The mechanisms seen are counted
// on the outputs; done rises when all traffic has drained.
module tb_tx_agent
  import tx_pkg::*;
#(
  parameter bit          MULTI   = 1'b1,
  parameter xform_t      KIND    = XF_FWD,
  parameter int unsigned IN_W    = 16,
  parameter int unsigned OUT_W   = 16,
  parameter int          NBLK    = 300,
  parameter int          LIM_FWD = 256,
  parameter int          LIM_INV = 2048,
  parameter int          LIM_HAD = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               de,
  output xform_t             mode,
  output logic [4*IN_W-1:0]  din,
  input  logic               oe,
  input  xform_t             out_mode,
  input  logic [4*OUT_W-1:0] dout,
  output logic               done,
  output int                 checks,
  output int                 failures,
  output int                 n_stall,
  output int                 n_drain,
  output int                 n_dir0,
  output int                 n_dir1,
  output int                 n_mixed,
  output int                 n_round,
  output int                 n_bypass,
  output int                 n_mode [3]
);

  typedef int blk_t [4][4];

  function automatic int m2(xform_t md, int r, int c);  // twice the matrix entry
    int f [4][4] = '{'{2, 2, 2, 2}, '{4, 2, -2, -4}, '{2, -2, -2, 2}, '{2, -4, 4, -2}};
    int h [4][4] = '{'{2, 2, 2, 2}, '{2, 2, -2, -2}, '{2, -2, -2, 2}, '{2, -2, 2, -2}};
    int v [4][4] = '{'{2, 2, 2, 1}, '{2, 1, -2, -2}, '{2, -1, -2, 2}, '{2, -2, 2, -1}};
    case (md)
      XF_FWD:  return f[r][c];
      XF_HAD:  return h[r][c];
      default: return v[r][c];
    endcase
  endfunction

  function automatic int dot(xform_t md, int r, int x [4]);
    int s = 0;
    for (int c = 0; c < 4; c++) begin
      int k = m2(md, r, c);
      if (k == 1 || k == -1) s += k * (x[c] >>> 1);
      else                   s += (k / 2) * x[c];
    end
    return s;
  endfunction

  // res[r][c]: row r, column c of the 2D result
  function automatic blk_t ref_2d(xform_t md, blk_t b);
    blk_t mid, res;
    int v [4];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) v[c] = b[r][c];
      for (int c = 0; c < 4; c++) mid[r][c] = dot(md, c, v);
    end
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) v[r] = mid[r][c];
      for (int r = 0; r < 4; r++) begin
        res[r][c] = dot(md, r, v);
        if (md == XF_INV) res[r][c] = (res[r][c] + 32) >>> 6;
      end
    end
    return res;
  endfunction

  typedef struct {
    logic [4*OUT_W-1:0] data;
    xform_t             md;
    logic               left;  // read out while the array shifts left
  } exp_t;
  typedef struct {
    int in_cycle;
    int in_stalls;
  } stamp_t;

  exp_t   exp_q [$];
  stamp_t in_q  [$];
  int     cycle = 0;
  int     stalls_seen = 0;
  int     n_blocks = 0;
  int     range_bad = 0;
  logic   mid_block = 1'b0;
  logic   tp_on = 1'b0;
  int     tp_first = -1, tp_last = -1, tp_cnt = 0;

  localparam int OMAX = (1 << (OUT_W - 1)) - 1;

  task automatic expect_block(xform_t md, blk_t b);
    blk_t res;
    exp_t e;
    res = ref_2d(md, b);
    for (int k = 0; k < 4; k++) begin
      for (int r = 0; r < 4; r++) begin
        if (res[r][k] > OMAX || res[r][k] < -OMAX - 1) range_bad++;
        e.data[OUT_W*r +: OUT_W] = OUT_W'(res[r][k]);
      end
      e.md   = md;
      e.left = (n_blocks % 2) == 0;  // written down first, read out the other way
      exp_q.push_back(e);
    end
    n_blocks++;
  endtask

  task automatic send_block(xform_t md, blk_t b, int stall_pct);
    expect_block(md, b);
    for (int r = 0; r < 4; r++) begin
      if (r != 0 && int'($urandom % 100) < stall_pct) begin
        de        <= 1'b0;
        mid_block <= 1'b1;
        din       <= (4*IN_W)'({$urandom, $urandom});
        @(posedge clk);
        n_stall++;
      end
      de        <= 1'b1;
      mid_block <= 1'b0;
      mode      <= md;
      for (int c = 0; c < 4; c++) din[IN_W*c +: IN_W] <= IN_W'(b[r][c]);
      @(posedge clk);
    end
    n_mode[md]++;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      de  <= 1'b0;
      din <= (4*IN_W)'({$urandom, $urandom});
      @(posedge clk);
    end
  endtask

  task automatic rand_block(output xform_t md, output blk_t b);
    int lim;
    md  = MULTI ? xform_t'($urandom % 3) : KIND;
    lim = (md == XF_FWD) ? LIM_FWD : (md == XF_INV) ? LIM_INV : LIM_HAD;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[r][c] = -lim + int'($urandom % (2 * lim));
  endtask

  // monitor: input stamps, stalls, output checks, all at the falling edge
  always @(negedge clk) begin
    cycle++;
    if (rst_n) begin
      if (de) in_q.push_back('{cycle, stalls_seen});
      if (!de && mid_block) stalls_seen++;
      if (de && oe && mode != out_mode) n_mixed++;
      if (tp_on && oe) begin
        if (tp_first < 0) tp_first = cycle;
        tp_last = cycle;
        tp_cnt++;
      end
      if (oe) begin
        exp_t   e;
        stamp_t st;
        if (out_mode == XF_INV) n_round++; else n_bypass++;
        if (!de && exp_q.size() > 0) n_drain++;
        checks++;
        if (exp_q.size() == 0 || in_q.size() == 0) begin
          failures++;
          $display("FAIL %m cycle %0d: output with nothing expected", cycle);
        end else begin
          e  = exp_q.pop_front();
          st = in_q.pop_front();
          if (e.left) n_dir1++; else n_dir0++;
          if (dout !== e.data || out_mode !== e.md) begin
            failures++;
            $display("FAIL %m cycle %0d: dout %h mode %0d, expected %h mode %0d",
                     cycle, dout, out_mode, e.data, e.md);
          end
          checks++;
          if (cycle - st.in_cycle - (stalls_seen - st.in_stalls) != 4) begin
            failures++;
            $display("FAIL %m cycle %0d: latency %0d with %0d stalls, expected 4",
                     cycle, cycle - st.in_cycle, stalls_seen - st.in_stalls);
          end
        end
      end
    end
  end

  initial begin
    blk_t   b;
    xform_t md;
    checks = 0; failures = 0; done = 1'b0;
    n_stall = 0; n_drain = 0; n_dir0 = 0; n_dir1 = 0; n_mixed = 0;
    n_round = 0; n_bypass = 0; n_mode = '{0, 0, 0};
    de = 1'b0; mode = MULTI ? XF_FWD : KIND; din = '0;
    @(posedge clk iff rst_n);

    // directed: all ones
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) b[r][c] = 1;
    send_block(MULTI ? XF_FWD : KIND, b, 0);
    idle(6);

    // 16 blocks back to back
    tp_on = 1'b1;
    for (int i = 0; i < 16; i++) begin
      rand_block(md, b);
      send_block(md, b, 0);
    end
    idle(6);
    tp_on = 1'b0;
    checks++;
    if (exp_q.size() != 0 || tp_last - tp_first != 63 || tp_cnt != 64) begin
      failures++;
      $display("FAIL %m: throughput: outputs in cycles %0d..%0d, %0d of them, %0d left",
               tp_first, tp_last, tp_cnt, exp_q.size());
    end

    // random traffic
    for (int i = 0; i < NBLK; i++) begin
      rand_block(md, b);
      send_block(md, b, 20);
      if ($urandom % 100 < 25) idle(int'($urandom % 6));
    end
    idle(8);

    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %m: %0d columns never came out", exp_q.size()); end
    if (range_bad != 0) begin failures++; $display("FAIL %m: %0d reference values exceed %0d bits", range_bad, OUT_W); end
    done = 1'b1;
  end

endmodule

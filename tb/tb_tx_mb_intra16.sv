// tb_tx_mb_intra16 - one 16x16-intra luma macroblock through the processor.
//
// The workload the multiple-transform processor exists for: a macroblock whose
// sixteen 4x4 luma blocks need the forward transform and whose sixteen DC
// terms then need the Hadamard transform (encoder side), and the reverse
// (decoder side: Hadamard of the DC block, then sixteen inverse transforms).
// Quantisation and its scaling lie outside the processor and are left out, so
// the decoder side gets its own random coefficients.
//
// Encoder: residuals in -64..63 so that the Hadamard of the DC block stays
// within 16 bits. The 16 blocks go in back to back (64 cycles); the DC block is
// built from the first sample of each block's first output column and sent as
// soon as the last one has come out. Decoder: a random DC block in -128..127
// is Hadamard transformed, each result becomes the DC of one block with AC
// coefficients in -256..255, and the 16 blocks go through the inverse.
// Every output is compared with a reference computed here from the transform
// matrices, and each side must finish within its cycle budget: 16 blocks at
// four rows per cycle plus the four-cycle latency, plus one Hadamard block.
module tb_tx_mb_intra16;
  import tx_pkg::*;

  localparam int W = TX_W;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           de;
  xform_t         mode;
  logic [4*W-1:0] din;
  logic           oe;
  xform_t         out_mode;
  logic [4*W-1:0] dout;

  int checks = 0, failures = 0;
  int cycle = 0;

  tx_mt4x4 dut (.*);

  always #5 clk = ~clk;

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

  // outputs, as they arrive
  logic [4*W-1:0] out_q [$];
  xform_t         out_m [$];
  int             last_out;
  int             t0;           // cycle of the first row after `arm` is set
  logic           arm = 1'b0;
  always @(negedge clk) begin
    cycle++;
    if (arm && de) begin
      t0  = cycle;
      arm = 1'b0;
    end
    if (rst_n && oe) begin
      out_q.push_back(dout);
      out_m.push_back(out_mode);
      last_out = cycle;
    end
  end

  task automatic send(xform_t md, blk_t b);
    for (int r = 0; r < 4; r++) begin
      de   <= 1'b1;
      mode <= md;
      for (int c = 0; c < 4; c++) din[W*c +: W] <= W'(b[r][c]);
      @(posedge clk);
    end
  endtask

  task automatic idle(int n);
    repeat (n) begin
      de <= 1'b0;
      @(posedge clk);
    end
  endtask

  // pop one block's four columns and compare with the expected result
  task automatic check_block(string what, int idx, xform_t md, blk_t e, output blk_t got);
    for (int c = 0; c < 4; c++) begin
      logic [4*W-1:0] w;
      xform_t         m;
      checks++;
      if (out_q.size() == 0) begin
        failures++;
        $display("FAIL %s %0d: missing column %0d", what, idx, c);
        continue;
      end
      w = out_q.pop_front();
      m = out_m.pop_front();
      if (m !== md) begin failures++; $display("FAIL %s %0d: mode %0d", what, idx, m); end
      for (int r = 0; r < 4; r++) begin
        got[r][c] = int'($signed(w[W*r +: W]));
        checks++;
        if (w[W*r +: W] !== W'(e[r][c])) begin
          failures++;
          $display("FAIL %s %0d: [%0d][%0d] = %0d expected %0d", what, idx, r, c,
                   got[r][c], e[r][c]);
        end
      end
    end
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t blk [16], dc, dc_res, got, e;

    rst_n = 1'b0; de = 1'b0; mode = XF_FWD; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // ---------------- encoder side ----------------
    for (int n = 0; n < 16; n++)
      foreach (blk[n][r, c]) blk[n][r][c] = rnd(-64, 63);
    arm = 1'b1;
    for (int n = 0; n < 16; n++) send(XF_FWD, blk[n]);
    // the last block's first column leaves four cycles after its first row,
    // in the cycle after its last row: the DC block is then complete
    idle(1);
    checks++;
    if (out_q.size() != 61) begin
      failures++;
      $display("FAIL: %0d forward columns out when the last DC should be ready", out_q.size());
    end
    for (int n = 0; n < 16; n++) dc[n / 4][n % 4] = int'($signed(out_q[4 * n][W-1:0]));
    send(XF_HAD, dc);
    idle(8);
    for (int n = 0; n < 16; n++) begin
      e = ref_2d(XF_FWD, blk[n]);
      check_block("forward block", n, XF_FWD, e, got);
    end
    e = ref_2d(XF_HAD, dc);
    check_block("DC Hadamard", 0, XF_HAD, e, dc_res);
    checks++;
    // 64 forward rows, one cycle for the last DC, 4 Hadamard rows; the last
    // column leaves four cycles after the last row
    if (last_out - t0 != 64 + 1 + 3 + 4) begin
      failures++;
      $display("FAIL: encoder side took %0d cycles", last_out - t0);
    end
    $display("encoder side: %0d cycles for 16 forward blocks and the DC Hadamard", last_out - t0);

    // ---------------- decoder side ----------------
    foreach (dc[r, c]) dc[r][c] = rnd(-128, 127);
    arm = 1'b1;
    send(XF_HAD, dc);
    for (int n = 0; n < 16; n++)
      foreach (blk[n][r, c]) blk[n][r][c] = rnd(-256, 255);
    // the Hadamard result is ready four cycles after its first row; the inverse
    // blocks follow straight away with their DC filled in
    e = ref_2d(XF_HAD, dc);
    for (int n = 0; n < 16; n++) blk[n][0][0] = e[n / 4][n % 4];
    send(XF_INV, blk[0]);   // block 0 goes in while the Hadamard columns come out
    check_block("DC inverse Hadamard", 0, XF_HAD, e, dc_res);
    for (int n = 1; n < 16; n++) send(XF_INV, blk[n]);
    idle(6);
    for (int n = 0; n < 16; n++) begin
      e = ref_2d(XF_INV, blk[n]);
      check_block("inverse block", n, XF_INV, e, got);
    end
    checks++;
    // 4 Hadamard rows and 64 inverse rows back to back; the last column
    // leaves four cycles after the last row
    if (last_out - t0 != 4 + 63 + 4) begin
      failures++;
      $display("FAIL: decoder side took %0d cycles", last_out - t0);
    end
    $display("decoder side: %0d cycles for the DC Hadamard and 16 inverse blocks", last_out - t0);
    checks++;
    if (out_q.size() != 0) begin failures++; $display("FAIL: %0d extra outputs", out_q.size()); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

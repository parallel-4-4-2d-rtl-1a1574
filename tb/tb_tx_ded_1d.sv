// tb_tx_ded_1d - self-checking test of the dedicated 1D transform units.
//
// Instantiates each unit at the widths of both passes of its dedicated
// processor: tx_fwd_1d 9->12 and 12->15, tx_had_1d 14->16 and 16->18,
// tx_inv_1d 15->16 and 16->16. Random inputs span the full input range and the
// outputs are compared with the transform matrix evaluated here (1/2 entries of
// the inverse applied to the input shifted right by one). For the forward and
// Hadamard units the exact result must fit the output width, which checks the
// claimed bit growth; the inverse is compared modulo 2^16.
module tb_tx_ded_1d;
  import tx_pkg::*;

  int checks = 0, failures = 0;

  logic signed [8:0]  f1_x [4];  logic signed [11:0] f1_y [4];
  logic signed [11:0] f2_x [4];  logic signed [14:0] f2_y [4];
  logic signed [13:0] h1_x [4];  logic signed [15:0] h1_y [4];
  logic signed [15:0] h2_x [4];  logic signed [17:0] h2_y [4];
  logic signed [14:0] i1_x [4];  logic signed [15:0] i1_y [4];
  logic signed [15:0] i2_x [4];  logic signed [15:0] i2_y [4];

  tx_fwd_1d #(.IW(9),  .OW(12)) u_f1 (.x(f1_x), .y(f1_y));
  tx_fwd_1d #(.IW(12), .OW(15)) u_f2 (.x(f2_x), .y(f2_y));
  tx_had_1d #(.IW(14), .OW(16)) u_h1 (.x(h1_x), .y(h1_y));
  tx_had_1d #(.IW(16), .OW(18)) u_h2 (.x(h2_x), .y(h2_y));
  tx_inv_1d #(.IW(15), .OW(16)) u_i1 (.x(i1_x), .y(i1_y));
  tx_inv_1d #(.IW(16), .OW(16)) u_i2 (.x(i2_x), .y(i2_y));

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

  function automatic int ref_y(xform_t md, int r, int x [4]);
    int s = 0;
    for (int c = 0; c < 4; c++) begin
      int k = m2(md, r, c);
      if (k == 1 || k == -1) s += k * (x[c] >>> 1);
      else                   s += (k / 2) * x[c];
    end
    return s;
  endfunction

  function automatic int rnd(int bits);
    return int'($urandom % (1 << bits)) - (1 << (bits - 1));
  endfunction

  // compare one unit's outputs; exact: the true result must fit ow bits
  task automatic cmp(string name, xform_t md, int x [4], int y [4], int ow, bit exact);
    for (int r = 0; r < 4; r++) begin
      int e = ref_y(md, r, x);
      int m = (e << (32 - ow)) >>> (32 - ow);  // e modulo 2^ow, signed
      checks++;
      if (y[r] != m || (exact && m != e)) begin
        failures++;
        $display("FAIL %s: x=(%0d %0d %0d %0d) y[%0d]=%0d expected %0d",
                 name, x[0], x[1], x[2], x[3], r, y[r], e);
      end
    end
  endtask

  initial begin
    int x [4], y [4];
    for (int n = 0; n < 4000; n++) begin
      // forward, pass 1 and pass 2; the first rounds use the range extremes
      foreach (x[i]) x[i] = (n < 2) ? (((i + n) % 2) ? 255 : -256) : rnd(9);
      foreach (x[i]) f1_x[i] = 9'(x[i]);
      #1; foreach (y[i]) y[i] = f1_y[i];
      cmp("fwd 9->12", XF_FWD, x, y, 12, 1'b1);
      foreach (x[i]) x[i] = (n < 2) ? (((i + n) % 2) ? 2047 : -2048) : rnd(12);
      foreach (x[i]) f2_x[i] = 12'(x[i]);
      #1; foreach (y[i]) y[i] = f2_y[i];
      cmp("fwd 12->15", XF_FWD, x, y, 15, 1'b1);
      // Hadamard
      foreach (x[i]) x[i] = (n < 2) ? ((n == 0) ? -8192 : 8191) : rnd(14);
      foreach (x[i]) h1_x[i] = 14'(x[i]);
      #1; foreach (y[i]) y[i] = h1_y[i];
      cmp("had 14->16", XF_HAD, x, y, 16, 1'b1);
      foreach (x[i]) x[i] = (n < 2) ? ((n == 0) ? -32768 : 32767) : rnd(16);
      foreach (x[i]) h2_x[i] = 16'(x[i]);
      #1; foreach (y[i]) y[i] = h2_y[i];
      cmp("had 16->18", XF_HAD, x, y, 18, 1'b1);
      // inverse
      foreach (x[i]) x[i] = rnd(15);
      foreach (x[i]) i1_x[i] = 15'(x[i]);
      #1; foreach (y[i]) y[i] = i1_y[i];
      cmp("inv 15->16", XF_INV, x, y, 16, 1'b0);
      foreach (x[i]) x[i] = rnd(16);
      foreach (x[i]) i2_x[i] = 16'(x[i]);
      #1; foreach (y[i]) y[i] = i2_y[i];
      cmp("inv 16->16", XF_INV, x, y, 16, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

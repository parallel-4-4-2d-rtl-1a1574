// tb_tx_1d - self-checking test of the reconfigurable 1D transform unit.
//
// Applies directed and random vectors in all three modes and compares the
// outputs with the transform matrices evaluated here: the forward and Hadamard
// matrices directly, the inverse matrix with each 1/2 entry applied to the
// input shifted right by one (the H.264 definition). Random inputs cover the
// full 16-bit range for the forward and Hadamard modes (compared modulo 2^16,
// as the unit wraps) and a 14-bit range for the inverse mode.
module tb_tx_1d;
  import tx_pkg::*;

  localparam int W = TX_W;

  xform_t              mode;
  logic signed [W-1:0] x [4];
  logic signed [W-1:0] y [4];

  int checks = 0, failures = 0;

  tx_1d #(.W(W)) dut (.mode(mode), .x(x), .y(y));

  function automatic int coef(xform_t md, int r, int c);  // twice the matrix entry
    int f [4][4] = '{'{2, 2, 2, 2}, '{4, 2, -2, -4}, '{2, -2, -2, 2}, '{2, -4, 4, -2}};
    int h [4][4] = '{'{2, 2, 2, 2}, '{2, 2, -2, -2}, '{2, -2, -2, 2}, '{2, -2, 2, -2}};
    int v [4][4] = '{'{2, 2, 2, 1}, '{2, 1, -2, -2}, '{2, -1, -2, 2}, '{2, -2, 2, -1}};
    case (md)
      XF_FWD:  return f[r][c];
      XF_HAD:  return h[r][c];
      default: return v[r][c];
    endcase
  endfunction

  task automatic check(xform_t md, int a0, int a1, int a2, int a3);
    int in [4] = '{a0, a1, a2, a3};
    int e;
    mode = md;
    for (int i = 0; i < 4; i++) x[i] = W'(in[i]);
    #1;
    for (int r = 0; r < 4; r++) begin
      e = 0;
      for (int c = 0; c < 4; c++) begin
        int k = coef(md, r, c);
        if (k == 1 || k == -1) e += k * (in[c] >>> 1);
        else                   e += (k / 2) * in[c];
      end
      checks++;
      if (y[r] !== W'(e)) begin
        failures++;
        $display("FAIL mode %0d x=(%0d %0d %0d %0d): y[%0d]=%0d expected %0d",
                 md, a0, a1, a2, a3, r, y[r], W'(e));
      end
    end
  endtask

  function automatic int rnd(int bits);
    return int'($urandom % (1 << bits)) - (1 << (bits - 1));
  endfunction

  initial begin
    // directed: unit vectors give the matrix columns
    for (int m = 0; m < 3; m++) begin
      check(xform_t'(m), 1, 0, 0, 0);
      check(xform_t'(m), 0, 1, 0, 0);
      check(xform_t'(m), 0, 0, 1, 0);
      check(xform_t'(m), 0, 0, 0, 1);
      check(xform_t'(m), 0, 2, 0, 2);
      check(xform_t'(m), 0, -3, 0, -5);
    end
    for (int i = 0; i < 3000; i++) begin
      check(XF_FWD, rnd(16), rnd(16), rnd(16), rnd(16));
      check(XF_HAD, rnd(16), rnd(16), rnd(16), rnd(16));
      check(XF_INV, rnd(14), rnd(14), rnd(14), rnd(14));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

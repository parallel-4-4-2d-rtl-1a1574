// tb_tx_round - self-checking test of the inverse-transform output stage.
//
// In inverse mode each output must equal floor((y + 32) / 64); in forward and
// Hadamard modes it must equal y. Covers the extremes of the 16-bit range and
// random values, and compares against a reference worked out with integer
// division here.
module tb_tx_round;
  import tx_pkg::*;

  localparam int W = TX_W;

  xform_t              mode;
  logic signed [W-1:0] y [4];
  logic signed [W-1:0] z [4];

  int checks = 0, failures = 0;

  tx_round #(.W(W)) dut (.mode(mode), .y(y), .z(z));

  function automatic int floor_div64(int v);
    return (v >= 0) ? v / 64 : -((-v + 63) / 64);
  endfunction

  task automatic check(xform_t md, int v0, int v1, int v2, int v3);
    int v [4] = '{v0, v1, v2, v3};
    int e;
    mode = md;
    for (int i = 0; i < 4; i++) y[i] = W'(v[i]);
    #1;
    for (int i = 0; i < 4; i++) begin
      e = (md == XF_INV) ? floor_div64(v[i] + 32) : v[i];
      checks++;
      if (z[i] !== W'(e)) begin
        failures++;
        $display("FAIL mode %0d y=%0d: z=%0d expected %0d", md, v[i], z[i], e);
      end
    end
  endtask

  function automatic int rnd16();
    return int'($urandom % 65536) - 32768;
  endfunction

  initial begin
    for (int m = 0; m < 3; m++) begin
      check(xform_t'(m), 32767, -32768, 31, 32);
      check(xform_t'(m), -32, -33, 0, 95);
      check(xform_t'(m), 96, -96, -97, 63);
    end
    for (int i = 0; i < 3000; i++)
      check(xform_t'($urandom % 3), rnd16(), rnd16(), rnd16(), rnd16());
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

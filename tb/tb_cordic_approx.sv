// tb_cordic_approx: streams vectors with a small residual, as the 16
// micro-rotations leave them, one per cycle, through the approximation step of
// all four kinds and compares with the exact finishing step in real arithmetic:
//   circular rotation : x cos z - y sin z,  x sin z + y cos z
//   linear rotation   : x,  y + x z
//   circular vectoring: z + atan(y/x)
//   linear vectoring  : z + y/x
//   hyperbolic rotation : x cosh z + y sinh z,  x sinh z + y cosh z
//   hyperbolic vectoring: z + atanh(y/x)
// The result of input n must appear 2 cycles later.
module tb_cordic_approx;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 400, LAT = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cvec_t vr, vv, vvl;       // rotation input, circular-vectoring input, linear-vectoring input
  cvec_t o [6];
  cvec_t s_r [N], s_v [N], s_vl [N];
  cvec_t res [6][N];

  cordic_approx #(.MODE(ROTATION), .FUNC(CIRCULAR)) u0 (.clk, .en(1'b1), .v_in(vr),  .v_out(o[0]));
  cordic_approx #(.MODE(ROTATION), .FUNC(LINEAR))   u1 (.clk, .en(1'b1), .v_in(vr),  .v_out(o[1]));
  cordic_approx #(.MODE(VECTOR),   .FUNC(CIRCULAR)) u2 (.clk, .en(1'b1), .v_in(vv),  .v_out(o[2]));
  cordic_approx #(.MODE(VECTOR),   .FUNC(LINEAR))   u3 (.clk, .en(1'b1), .v_in(vvl), .v_out(o[3]));
  cordic_approx #(.MODE(ROTATION), .FUNC(HYPERBOLIC)) u4 (.clk, .en(1'b1), .v_in(vr), .v_out(o[4]));
  cordic_approx #(.MODE(VECTOR),   .FUNC(HYPERBOLIC)) u5 (.clk, .en(1'b1), .v_in(vv), .v_out(o[5]));

  function automatic fx_t r2q(input real r);
    return 34'(longint'(r * TWO30));
  endfunction

  task automatic chk(input bit ok, input string tag, input int n);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s failed at %0d", tag, n);
    end
  endtask

  initial begin
    real x, y, z, t, e;
    for (int n = 0; n < N; n++) begin
      s_r[n]  = '{x: r2q(urand_r(-2.3, 2.3)), y: r2q(urand_r(-2.3, 2.3)), z: r2q(urand_r(-3.05e-5, 3.05e-5))};
      x = urand_r(0.25, 3.9);
      s_v[n]  = '{x: r2q(x), y: r2q(x * urand_r(-3.05e-5, 3.05e-5)), z: r2q(urand_r(-3.0, 3.0))};
      x = urand_r(0.125, 1.99);
      s_vl[n] = '{x: r2q(x), y: r2q(x * urand_r(-3.05e-5, 3.05e-5)), z: r2q(urand_r(-1.9, 1.9))};
    end
    for (int c = 0; c < N + LAT; c++) begin
      vr  = (c < N) ? s_r[c]  : '0;
      vv  = (c < N) ? s_v[c]  : '0;
      vvl = (c < N) ? s_vl[c] : '0;
      @(posedge clk); #1;
      if (c >= LAT - 1 && c - (LAT - 1) < N)
        for (int u = 0; u < 6; u++) res[u][c-(LAT-1)] = o[u];
    end
    for (int n = 0; n < N; n++) begin
      x = q2r(64'(s_r[n].x)); y = q2r(64'(s_r[n].y)); z = q2r(64'(s_r[n].z));
      chk(absr(q2r(64'(res[0][n].x)) - (x * $cos(z) - y * $sin(z))) < 5e-9 &&
          absr(q2r(64'(res[0][n].y)) - (x * $sin(z) + y * $cos(z))) < 5e-9 && res[0][n].z == s_r[n].z, "rot/circ", n);
      chk(res[1][n].x == s_r[n].x && absr(q2r(64'(res[1][n].y)) - (y + x * z)) < 5e-9, "rot/lin", n);
      chk(absr(q2r(64'(res[4][n].x)) - (x * $cosh(z) + y * $sinh(z))) < 5e-9 &&
          absr(q2r(64'(res[4][n].y)) - (x * $sinh(z) + y * $cosh(z))) < 5e-9 && res[4][n].z == s_r[n].z, "rot/hyp", n);
      x = q2r(64'(s_v[n].x)); y = q2r(64'(s_v[n].y)); z = q2r(64'(s_v[n].z));
      e = absr(q2r(64'(res[2][n].z)) - (z + $atan(y / x)));
      if (e >= 1e-8) $display("vc x %f y %g e %g", x, y, e);
      chk(e < 1e-8, "vec/circ", n);
      e = absr(q2r(64'(res[5][n].z)) - (z + 0.5 * $ln((x + y) / (x - y))));
      chk(e < 1e-8 && res[5][n].x == s_v[n].x, "vec/hyp", n);
      x = q2r(64'(s_vl[n].x)); y = q2r(64'(s_vl[n].y)); z = q2r(64'(s_vl[n].z));
      t = z + y / x;
      chk(absr(q2r(64'(res[3][n].z)) - t) < 1e-8 && res[3][n].x == s_vl[n].x, "vec/lin", n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

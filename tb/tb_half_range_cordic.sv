// tb_half_range_cordic: streams random vectors, one per cycle, through the
// 16-stage micro-rotation chain in all four kinds and checks, in real
// arithmetic, what 16 micro-rotations must leave:
//   circular rotation : (x,y) = K16 * R(z0 - zr) (x0,y0), |zr| <= atan(2^-15)-ish
//   circular vectoring: x = K16*|v0|*cos(yr angle), z + atan2(y,x) = z0 + atan2(y0,x0)
//   linear rotation   : y = y0 + x0 (z0 - zr), x = x0
//   linear vectoring  : z = z0 + (y0 - y) / x0, x = x0
//   hyperbolic rotation : (x,y) = Kh16 * H(z0 - zr) (x0,y0), |zr| <= atanh(2^-14)-ish
//   hyperbolic vectoring: sqrt(x^2-y^2) = Kh16*sqrt(x0^2-y0^2), z + atanh(y/x) = z0 + atanh(y0/x0)
// (hyperbolic checks only where the input lies in the convergence range) and
// that each result appears exactly STAGES = 16 cycles after its input. Two
// combinational chains (EVAL = COMBINATIONAL) must give, in the same cycle,
// bit-identical results to their pipelined twins.
module tb_half_range_cordic;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 300, ST = 16;
  localparam real TOL = 1e-7;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cvec_t vin;
  cvec_t o [6];
  cvec_t stim [N];
  cvec_t res [6][N];
  cvec_t oc [2];
  cvec_t cres [2][N];

  half_range_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(CIRCULAR)) u0 (.clk, .en(1'b1), .v_in(vin), .v_out(o[0]));
  half_range_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(CIRCULAR)) u1 (.clk, .en(1'b1), .v_in(vin), .v_out(o[1]));
  half_range_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(LINEAR))   u2 (.clk, .en(1'b1), .v_in(vin), .v_out(o[2]));
  half_range_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(LINEAR))   u3 (.clk, .en(1'b1), .v_in(vin), .v_out(o[3]));
  half_range_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(HYPERBOLIC)) u4 (.clk, .en(1'b1), .v_in(vin), .v_out(o[4]));
  half_range_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(HYPERBOLIC)) u5 (.clk, .en(1'b1), .v_in(vin), .v_out(o[5]));
  half_range_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(CIRCULAR), .EVAL(COMBINATIONAL)) uc0 (.clk, .en(1'b1), .v_in(vin), .v_out(oc[0]));
  half_range_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(HYPERBOLIC), .EVAL(COMBINATIONAL)) uc1 (.clk, .en(1'b1), .v_in(vin), .v_out(oc[1]));

  function automatic real atanh_r(input real t);
    return 0.5 * $ln((1.0 + t) / (1.0 - t));
  endfunction

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
    real k, kh, x0, y0, z0, x, y, z, a;
    int  n_hr, n_hv;
    k = cordic_gain(ST);
    kh = hyp_gain(ST);
    n_hr = 0; n_hv = 0;
    for (int n = 0; n < N; n++)
      stim[n] = '{x: r2q(urand_r(0.05, 1.0)), y: r2q(urand_r(-1.0, 1.0)), z: r2q(urand_r(-1.5, 1.5))};
    // stream: mark each input with its cycle; result n is due ST cycles later
    for (int c = 0; c < N + ST; c++) begin
      vin = (c < N) ? stim[c] : '0;
      #1;
      if (c < N) begin cres[0][c] = oc[0]; cres[1][c] = oc[1]; end
      @(posedge clk); #1;
      if (c >= ST - 1 && c - (ST - 1) < N)
        for (int u = 0; u < 6; u++) res[u][c-(ST-1)] = o[u];
    end
    for (int n = 0; n < N; n++) begin
      chk(cres[0][n] == res[0][n] && cres[1][n] == res[5][n], "combinational = pipelined", n);
      x0 = q2r(64'(stim[n].x)); y0 = q2r(64'(stim[n].y)); z0 = q2r(64'(stim[n].z));
      // circular rotation
      x = q2r(64'(res[0][n].x)); y = q2r(64'(res[0][n].y)); z = q2r(64'(res[0][n].z));
      a = z0 - z;
      chk(absr(z) < 3.1e-5, "rot/circ residual", n);
      chk(absr(x - k * (x0 * $cos(a) - y0 * $sin(a))) < TOL && absr(y - k * (x0 * $sin(a) + y0 * $cos(a))) < TOL, "rot/circ xy", n);
      // circular vectoring
      x = q2r(64'(res[1][n].x)); y = q2r(64'(res[1][n].y)); z = q2r(64'(res[1][n].z));
      chk(absr(y) < x * 6.2e-5, "vec/circ residual", n);
      chk(absr(z + $atan2(y, x) - (z0 + $atan2(y0, x0))) < TOL, "vec/circ z", n);
      chk(absr($sqrt(x * x + y * y) - k * $sqrt(x0 * x0 + y0 * y0)) < TOL, "vec/circ |v|", n);
      // linear rotation (only meaningful where |z0| < 2)
      x = q2r(64'(res[2][n].x)); y = q2r(64'(res[2][n].y)); z = q2r(64'(res[2][n].z));
      chk(res[2][n].x == stim[n].x && absr(y - (y0 + x0 * (z0 - z))) < TOL && absr(z) < 3.1e-5, "rot/lin", n);
      // linear vectoring (|y0/x0| < 2 required for convergence)
      x = q2r(64'(res[3][n].x)); y = q2r(64'(res[3][n].y)); z = q2r(64'(res[3][n].z));
      chk(res[3][n].x == stim[n].x && absr(z - (z0 + (y0 - y) / x0)) < TOL / x0, "vec/lin z", n);
      if (absr(y0 / x0) < 1.99) chk(absr(y) < x * 3.1e-5, "vec/lin residual", n);
      // hyperbolic rotation (converges for |z0| < 1.118)
      x = q2r(64'(res[4][n].x)); y = q2r(64'(res[4][n].y)); z = q2r(64'(res[4][n].z));
      a = z0 - z;
      if (absr(z0) < 1.1) begin
        n_hr++;
        chk(absr(z) < 6.2e-5, "rot/hyp residual", n);
        chk(absr(x - kh * (x0 * $cosh(a) + y0 * $sinh(a))) < TOL && absr(y - kh * (x0 * $sinh(a) + y0 * $cosh(a))) < TOL, "rot/hyp xy", n);
      end
      // hyperbolic vectoring (converges for |y0/x0| < 0.806)
      x = q2r(64'(res[5][n].x)); y = q2r(64'(res[5][n].y)); z = q2r(64'(res[5][n].z));
      if (absr(y0 / x0) < 0.8) begin
        n_hv++;
        chk(absr(y) < x * 1.3e-4, "vec/hyp residual", n);
        chk(absr(z + atanh_r(y / x) - (z0 + atanh_r(y0 / x0))) < TOL, "vec/hyp z", n);
        chk(absr($sqrt(x * x - y * y) - kh * $sqrt(x0 * x0 - y0 * y0)) < TOL, "vec/hyp |v|", n);
      end
    end
    chk(n_hr > 50 && n_hv > 50, "hyperbolic inputs in range", 0);
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

// tb_cordic_core: streams random operands over the full angle range through
// angle correction plus 16 micro-rotations and checks, in real arithmetic,
// the results that only work if the correction and the rotations agree:
//   circular rotation, z0 in (-pi, pi):  (x,y) = K16 * R(z0 - zr)(x0,y0)
//   circular vectoring, any quadrant:    z + atan2(y,x) = z0 + atan2(y0,x0) (mod 2 pi)
//   linear vectoring, x0 of either sign: z = z0 + (y0/x0 - y/x)
// with every result appearing exactly 17 cycles after its input.
module tb_cordic_core;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 300, LAT = 17;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 1e-7;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cvec_t vin;
  cvec_t o [3];
  cvec_t stim [N];
  cvec_t res [3][N];

  cordic_core #(.MODE(ROTATION), .FUNC(CIRCULAR)) u0 (.clk, .en(1'b1), .v_in(vin), .v_out(o[0]));
  cordic_core #(.MODE(VECTOR),   .FUNC(CIRCULAR)) u1 (.clk, .en(1'b1), .v_in(vin), .v_out(o[1]));
  cordic_core #(.MODE(VECTOR),   .FUNC(LINEAR))   u2 (.clk, .en(1'b1), .v_in(vin), .v_out(o[2]));

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
    real k, x0, y0, z0, x, y, z, a, d;
    k = cordic_gain(16);
    for (int n = 0; n < N; n++) begin
      x0 = urand_r(-1.0, 1.0);
      y0 = x0 * urand_r(-1.9, 1.9);
      stim[n] = '{x: r2q(x0), y: r2q(y0), z: r2q(urand_r(-PI + 0.01, PI - 0.01))};
    end
    for (int c = 0; c < N + LAT; c++) begin
      vin = (c < N) ? stim[c] : '0;
      @(posedge clk); #1;
      if (c >= LAT - 1 && c - (LAT - 1) < N)
        for (int u = 0; u < 3; u++) res[u][c-(LAT-1)] = o[u];
    end
    for (int n = 0; n < N; n++) begin
      x0 = q2r(64'(stim[n].x)); y0 = q2r(64'(stim[n].y)); z0 = q2r(64'(stim[n].z));
      x = q2r(64'(res[0][n].x)); y = q2r(64'(res[0][n].y)); z = q2r(64'(res[0][n].z));
      a = z0 - z;
      chk(absr(z) < 3.1e-5 && absr(x - k * (x0 * $cos(a) - y0 * $sin(a))) < TOL &&
          absr(y - k * (x0 * $sin(a) + y0 * $cos(a))) < TOL, "rot/circ", n);
      x = q2r(64'(res[1][n].x)); y = q2r(64'(res[1][n].y)); z = q2r(64'(res[1][n].z));
      d = absr(z + $atan2(y, x) - (z0 + $atan2(y0, x0)));
      // angle resolution of a short vector is one LSB over its length
      chk(x > 0.0 && (d < TOL + 4e-9 / x || absr(d - 2 * PI) < TOL + 4e-9 / x), "vec/circ", n);
      x = q2r(64'(res[2][n].x)); y = q2r(64'(res[2][n].y)); z = q2r(64'(res[2][n].z));
      chk(x > 0.0 && absr(z - (z0 + y0 / x0 - y / x)) < TOL / x && absr(y / x) < 3.1e-5, "vec/lin", n);
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

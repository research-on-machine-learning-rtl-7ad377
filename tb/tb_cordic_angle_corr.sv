// tb_cordic_angle_corr: checks the pre-rotation stage by its invariants, in
// real arithmetic: the rotation it leaves to do must equal the one requested
// (circular rotation: R(z')(x',y') = R(z)(x,y) and |z'| <= pi/2), the angle it
// has to find must be unchanged (circular vectoring: x' >= 0 and
// z' + atan2(y',x') = z + atan2(y,x)), and the quotient must be unchanged
// (linear and hyperbolic vectoring: x' >= 0, y'/x' = y/x; linear and
// hyperbolic rotation pass through). Also counts that each correction
// actually fired.
module tb_cordic_angle_corr;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int fired_rc = 0, fired_vc = 0, fired_vl = 0;

  cvec_t vin, o_rc, o_vc, o_vl, o_rl, o_vh, o_rh;
  cordic_angle_corr #(.MODE(ROTATION), .FUNC(CIRCULAR)) u_rc (.clk, .en(1'b1), .v_in(vin), .v_out(o_rc));
  cordic_angle_corr #(.MODE(VECTOR),   .FUNC(CIRCULAR)) u_vc (.clk, .en(1'b1), .v_in(vin), .v_out(o_vc));
  cordic_angle_corr #(.MODE(VECTOR),   .FUNC(LINEAR))   u_vl (.clk, .en(1'b1), .v_in(vin), .v_out(o_vl));
  cordic_angle_corr #(.MODE(ROTATION), .FUNC(LINEAR))   u_rl (.clk, .en(1'b1), .v_in(vin), .v_out(o_rl));
  cordic_angle_corr #(.MODE(VECTOR),   .FUNC(HYPERBOLIC)) u_vh (.clk, .en(1'b1), .v_in(vin), .v_out(o_vh));
  cordic_angle_corr #(.MODE(ROTATION), .FUNC(HYPERBOLIC)) u_rh (.clk, .en(1'b1), .v_in(vin), .v_out(o_rh));

  localparam real TOL = 1e-8;
  localparam real PI  = 3.14159265358979323846;

  task automatic chk(input bit ok, input string tag);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s failed", tag);
    end
  endtask

  initial begin
    real x, y, z, xo, yo, zo, tx, ty;
    for (int n = 0; n < 1000; n++) begin
      x = urand_r(-1.0, 1.0); y = urand_r(-1.0, 1.0); z = urand_r(-PI, PI);
      vin.x = 34'(longint'(x * TWO30)); vin.y = 34'(longint'(y * TWO30)); vin.z = 34'(longint'(z * TWO30));
      x = q2r(64'(vin.x)); y = q2r(64'(vin.y)); z = q2r(64'(vin.z));
      @(posedge clk); #1;
      // circular rotation
      xo = q2r(64'(o_rc.x)); yo = q2r(64'(o_rc.y)); zo = q2r(64'(o_rc.z));
      tx = x * $cos(z) - y * $sin(z); ty = x * $sin(z) + y * $cos(z);
      chk(absr(xo * $cos(zo) - yo * $sin(zo) - tx) < TOL && absr(xo * $sin(zo) + yo * $cos(zo) - ty) < TOL, "rot/circ target");
      chk(absr(zo) <= PI / 2 + TOL, "rot/circ range");
      if (o_rc.z != vin.z) fired_rc++;
      // circular vectoring
      xo = q2r(64'(o_vc.x)); yo = q2r(64'(o_vc.y)); zo = q2r(64'(o_vc.z));
      chk(xo >= 0.0, "vec/circ x>=0");
      if (x != 0.0 || y != 0.0)
        chk(absr(zo + $atan2(yo, xo) - (z + $atan2(y, x))) < TOL ||
            absr(absr(zo + $atan2(yo, xo) - (z + $atan2(y, x))) - 2 * PI) < TOL, "vec/circ angle");
      if (o_vc.z != vin.z) fired_vc++;
      // linear vectoring
      chk(!o_vl.x[33] && o_vl.z == vin.z && absr(q2r(64'(o_vl.y)) * x - y * q2r(64'(o_vl.x))) < TOL, "vec/lin");
      if (o_vl.x != vin.x) fired_vl++;
      // linear rotation passes through
      chk(o_rl == vin, "rot/lin");
      // hyperbolic: same as linear
      chk(o_vh == o_vl, "vec/hyp");
      chk(o_rh == vin, "rot/hyp");
    end
    chk(fired_rc > 0 && fired_vc > 0 && fired_vl > 0, "corrections fired");
    $display("corrections: rot/circ %0d vec/circ %0d vec/lin %0d", fired_rc, fired_vc, fired_vl);
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

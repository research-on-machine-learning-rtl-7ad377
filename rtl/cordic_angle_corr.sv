// cordic_angle_corr: quadrant (angle) correction, stage 0 of the CORDIC core.
//
// A circular CORDIC only converges for angles within about +-99.9 degrees, so
// the design puts one correction stage ahead of the micro-rotations. This
// implementation pre-rotates by a quarter turn, which keeps every value within
// the guard-bit range:
//   circular rotation : z >  pi/2 -> (x,y,z) = (-y,  x, z - pi/2)
//                       z < -pi/2 -> (x,y,z) = ( y, -x, z + pi/2)
//   circular vectoring: x < 0, y >= 0 -> ( y, -x, z + pi/2)
//                       x < 0, y <  0 -> (-y,  x, z - pi/2)
//   linear/hyperbolic vectoring: x < 0 -> (-x, -y, z)  (y/x is unchanged)
//   linear/hyperbolic rotation : values pass through (no quarter-turn
//                                identity exists for hyperbolic angles; the
//                                input must lie within about +-1.118).
// The register stage gives a latency of one enabled cycle.
module cordic_angle_corr
  import cordic_pkg::*;
#(
  parameter cordic_mode_e MODE = ROTATION,
  parameter cordic_func_e FUNC = CIRCULAR
) (
  input  logic  clk,
  input  logic  en,
  input  cvec_t v_in,
  output cvec_t v_out
);

  cvec_t nxt;

  always_comb begin
    nxt = v_in;
    if (FUNC == CIRCULAR && MODE == ROTATION) begin
      if (v_in.z > HALF_PI)
        nxt = '{x: -v_in.y, y: v_in.x, z: v_in.z - HALF_PI};
      else if (v_in.z < -HALF_PI)
        nxt = '{x: v_in.y, y: -v_in.x, z: v_in.z + HALF_PI};
    end else if (FUNC == CIRCULAR && MODE == VECTOR) begin
      if (v_in.x[IW-1]) begin
        if (!v_in.y[IW-1]) nxt = '{x: v_in.y,  y: -v_in.x, z: v_in.z + HALF_PI};
        else               nxt = '{x: -v_in.y, y: v_in.x,  z: v_in.z - HALF_PI};
      end
    end else if (MODE == VECTOR) begin
      if (v_in.x[IW-1]) nxt = '{x: -v_in.x, y: -v_in.y, z: v_in.z};
    end
  end

  always_ff @(posedge clk)
    if (en) v_out <= nxt;

endmodule

// cordic_microrotation: one pipelined CORDIC micro-rotation ("stage j").
//
// Computes, with a wired shift of SHIFT bits and a hard-wired angle constant
// alpha = atan(2^-SHIFT) (circular), 2^-SHIFT (linear) or atanh(2^-SHIFT)
// (hyperbolic):
//   x' = x - sigma * (y >>> SHIFT)     (circular; hyperbolic adds; linear keeps x)
//   y' = y + sigma * (x >>> SHIFT)
//   z' = z - sigma * alpha
// The direction sigma in {+1, -1} is sign(z) in rotation mode (z is driven to
// zero) and -sign(y) in vectoring mode (y is driven to zero). These are the
// classic update equations and the per-stage structure of the design: three
// add/subtract units and two wired shifters per stage, angle constants wired
// in. The result is registered (latency one enabled cycle) unless REG = 0,
// which leaves the stage combinational for the combinational evaluation mode.
module cordic_microrotation
  import cordic_pkg::*;
#(
  parameter int           SHIFT = 0,
  parameter cordic_mode_e MODE  = ROTATION,
  parameter cordic_func_e FUNC  = CIRCULAR,
  parameter bit           REG   = 1'b1
) (
  input  logic  clk,
  input  logic  en,
  input  cvec_t v_in,
  output cvec_t v_out
);

  localparam fx_t ALPHA = alpha_q30(FUNC, SHIFT);

  logic  pos;      // sigma = +1
  cvec_t nxt;

  always_comb begin
    fx_t xs, ys;
    pos = (MODE == ROTATION) ? !v_in.z[IW-1] : v_in.y[IW-1];
    xs  = v_in.x >>> SHIFT;
    ys  = v_in.y >>> SHIFT;
    unique case (FUNC)
      CIRCULAR:   nxt.x = pos ? v_in.x - ys : v_in.x + ys;
      HYPERBOLIC: nxt.x = pos ? v_in.x + ys : v_in.x - ys;
      default:    nxt.x = v_in.x;
    endcase
    nxt.y = pos ? v_in.y + xs    : v_in.y - xs;
    nxt.z = pos ? v_in.z - ALPHA : v_in.z + ALPHA;
  end

  if (REG) begin : g_reg
    always_ff @(posedge clk)
      if (en) v_out <= nxt;
  end else begin : g_comb
    assign v_out = nxt;
  end

endmodule

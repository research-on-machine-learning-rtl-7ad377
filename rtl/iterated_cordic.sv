// iterated_cordic: the micro-rotations done by one reused stage.
//
// The iterated evaluation mode of the CORDIC core: instead of STAGES
// registered stages, a single add/shift stage with a variable (barrel) shift
// and a small angle-constant table processes one vector over STAGES cycles.
// `load` takes v_in and performs micro-rotation 0 on it; each following
// enabled cycle performs the next one, with the shift and angle constant of
// that stage (cordic_pkg::stage_shift and alpha_q30, so circular, linear and
// hyperbolic sequences all work). After STAGES enabled cycles v_out holds the
// same bits the pipelined chain (half_range_cordic) would produce, and it
// stays there until the next load.
//
// Timing: the result of a load is on v_out STAGES enabled cycles later, the
// same latency as the pipelined chain. A new load may come at the earliest
// STAGES enabled cycles after the previous one; an earlier load restarts the
// unit and loses the vector in progress (the cell that uses it throttles its
// input so that this cannot happen). The design names pipelined, combinational
// and iterated evaluation modes; this module's structure is this
// implementation's.
module iterated_cordic
  import cordic_pkg::*;
#(
  parameter int           STAGES = 16,
  parameter cordic_mode_e MODE   = ROTATION,
  parameter cordic_func_e FUNC   = CIRCULAR
) (
  input  logic  clk,
  input  logic  en,
  input  logic  load,
  input  cvec_t v_in,
  output cvec_t v_out
);

  localparam int KW = $clog2(STAGES + 1);

  cvec_t         v, src, nxt;
  logic [KW-1:0] k, kk;

  always_comb begin
    int  sh;
    fx_t alpha, xs, ys;
    logic pos;
    src   = load ? v_in : v;
    kk    = load ? '0 : k;
    sh    = stage_shift(FUNC, int'(kk));
    alpha = alpha_q30(FUNC, sh);
    pos   = (MODE == ROTATION) ? !src.z[IW-1] : src.y[IW-1];
    xs    = src.x >>> sh;
    ys    = src.y >>> sh;
    unique case (FUNC)
      CIRCULAR:   nxt.x = pos ? src.x - ys : src.x + ys;
      HYPERBOLIC: nxt.x = pos ? src.x + ys : src.x - ys;
      default:    nxt.x = src.x;
    endcase
    nxt.y = pos ? src.y + xs    : src.y - xs;
    nxt.z = pos ? src.z - alpha : src.z + alpha;
  end

  // k counts the micro-rotations done; the unit idles once k reaches STAGES
  always_ff @(posedge clk) begin
    if (en && (load || 32'(k) < STAGES)) begin
      v <= nxt;
      k <= kk + 1'b1;
    end
  end

  assign v_out = v;

endmodule
